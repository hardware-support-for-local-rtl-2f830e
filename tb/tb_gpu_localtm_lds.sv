// End-to-end test of gpu_localtm_lds at its default size (32 banks of 512
// words, 4 wavefronts of 64 work-items, 4 shadowed vector registers).
//
// The test plays the compute unit. All four wavefronts run, interleaved one
// command at a time, a hash-table insert: inside a transaction every
// work-item reads the fill counter of bucket wi % K (a shared word), writes it
// back incremented, and writes its own id into the bucket's slot log (a word
// whose row hashes to the same Bloom bit, giving false owner hits), then
// writes its id into a tally word shared by the buckets of equal parity, where
// work-items that already updated a counter can conflict and must be rolled
// back in every bank. Work-items
// that conflict are restarted with EXEC = TCM until all commit. The run is
// made with K = 4 buckets and then with a single bucket, which forces the
// serialization modes.
// Checked: each work-item commits exactly once; every counter ends equal to
// the number of work-items hashed to it (atomicity and rollback); each slot
// log holds an id of that bucket; conflicted work-items see their vector
// register restored to its value at TX.Begin; TX.Begin answers in 2 cycles
// outside work-group serialization; TX.Begin of other wavefronts is refused
// while one wavefront holds the work-group lock; a coalesced 32-lane access
// takes as long as one lane and 64 lanes over 32 banks take two rounds.
// Counted, each required at least once: new access, owner hit, false owner
// hit, Bloom conflict, plain access, multi-round (bank-serialized) instruction,
// conflict broadcast, restart, wavefront serialization, work-group
// serialization, abort of other wavefronts, stalled TX.Begin, commit clear.
module tb_gpu_localtm_lds;
  import localtm_pkg::*;

  localparam int NB = 32, WF = 64, NW = 4, AW = 14, NWI = 256;
  localparam int NVARS = 16;

  logic clk = 0, rst_n = 0;
  logic [8:0] n_vars_i = 9'(NVARS);
  logic cmd_valid_i = 0, cmd_ready_o;
  cmd_e cmd_i = CMD_TX_BEGIN;
  logic [1:0] cmd_wf_i = '0;
  logic [WF-1:0] cmd_exec_i = '0;
  logic [WF-1:0][AW-1:0] cmd_addr_i = '0;
  logic [WF-1:0][31:0] cmd_wdata_i = '0;
  logic resp_valid_o;
  cmd_e resp_cmd_o;
  logic [1:0] resp_wf_o;
  logic [WF-1:0][31:0] resp_rdata_o;
  logic [WF-1:0] resp_done_o, resp_conflict_o, resp_exec_new_o;
  logic resp_restart_o;
  logic [NW-1:0][WF-1:0] tcm_o;
  tx_mode_e [NW-1:0] mode_o;
  logic wg_lock_o;
  logic [1:0] wg_lock_wf_o;
  logic [NB-1:0] ev_valid_o;
  acc_res_e [NB-1:0] ev_res_o;
  logic vr_wr_en_i = 0;
  logic [1:0] vr_wr_wf_i = '0, vr_wr_reg_i = '0, vr_rd_wf_i = '0, vr_rd_reg_i = '0;
  logic [WF-1:0] vr_wr_mask_i = '0;
  logic [WF-1:0][31:0] vr_wr_data_i = '0, vr_rd_data_o;

  gpu_localtm_lds dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int c_new = 0, c_own = 0, c_false_own = 0, c_conflict = 0, c_plain = 0;
  int c_multiround = 0, c_bcast = 0, c_restart = 0, c_wfser = 0, c_wgser = 0;
  int c_late_conflict = 0;
  int c_abort = 0, c_stall = 0, c_commit_clear = 0, c_vrestore = 0;
  int ev_per_bank [NB];

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  // bank outcome monitor
  always @(posedge clk) begin
    for (int b = 0; b < NB; b++) if (ev_valid_o[b]) begin
      ev_per_bank[b]++;
      unique case (ev_res_o[b])
        ACC_NEW:       c_new++;
        ACC_OWN:       c_own++;
        ACC_FALSE_OWN: c_false_own++;
        ACC_CONFLICT:  c_conflict++;
        default:       c_plain++;
      endcase
    end
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // issue a command, wait for its response; returns cycles after acceptance
  task automatic run_cmd(input cmd_e c, input int wf, input logic [WF-1:0] ex, output int cyc);
    cmd_i = c; cmd_wf_i = 2'(wf); cmd_exec_i = ex; cmd_valid_i = 1;
    for (int b = 0; b < NB; b++) ev_per_bank[b] = 0;
    do @(posedge clk); while (!cmd_ready_o);
    #1 cmd_valid_i = 0;
    cyc = 0;
    do begin @(posedge clk); #1 cyc++; end while (!resp_valid_o);
    if (c == CMD_LDS_READ || c == CMD_LDS_WRITE)
      for (int b = 0; b < NB; b++) if (ev_per_bank[b] > 1) begin c_multiround++; break; end
  endtask

  task automatic vr_write(input int wf, input int r, input logic [WF-1:0] mask,
                          input logic [WF-1:0][31:0] d);
    vr_wr_en_i = 1; vr_wr_wf_i = 2'(wf); vr_wr_reg_i = 2'(r); vr_wr_mask_i = mask; vr_wr_data_i = d;
    @(posedge clk); #1 vr_wr_en_i = 0;
  endtask

  task automatic vr_read(input int wf, input int r, output logic [WF-1:0][31:0] d);
    vr_rd_wf_i = 2'(wf); vr_rd_reg_i = 2'(r); #1 d = vr_rd_data_o;
  endtask

  function automatic logic [AW-1:0] addr_of(input int bank, input int row);
    return AW'(row * NB + bank);
  endfunction

  // plain (non-transactional) single-word access through lane 0 of wavefront 0
  task automatic plain(input bit we, input logic [AW-1:0] a, input logic [31:0] d, output logic [31:0] q);
    int cyc;
    cmd_addr_i = '0; cmd_addr_i[0] = a; cmd_wdata_i = '0; cmd_wdata_i[0] = d;
    run_cmd(we ? CMD_LDS_WRITE : CMD_LDS_READ, 0, 64'h1, cyc);
    q = resp_rdata_o[0];
  endtask

  // one hash-table insert run with K buckets
  task automatic ht_run(input int K);
    int pc [NW];
    logic [WF-1:0] exec [NW];
    int committed [NWI];
    logic [WF-1:0][31:0] snap1 [NW];      // register 1 at TX.Begin
    int expc [NB];
    int wf, ndone, cyc, guard;
    logic [31:0] q;
    logic [WF-1:0][31:0] d, v;

    plain(1, addr_of(16, 0), 32'hFFFF, q);
    plain(1, addr_of(17, 0), 32'hFFFF, q);
    for (int b = 0; b < K; b++) begin
      plain(1, addr_of(b, 0), 0, q);       // bucket counter
      plain(1, addr_of(b, 8), 32'hFFFF, q);// bucket slot log (row 8: same hash bit)
      expc[b] = 0;
    end
    for (int i = 0; i < NWI; i++) begin committed[i] = 0; expc[i % K]++; end
    for (int w = 0; w < NW; w++) begin
      pc[w] = 0; exec[w] = '1;
      for (int l = 0; l < WF; l++) d[l] = 32'h11110000 | 32'(w * WF + l);
      vr_write(w, 1, '1, d);
    end
    wf = 0; ndone = 0; guard = 0;
    while (ndone < NW && guard < 200000) begin
      guard++;
      wf = (wf + 1) % NW;
      if (pc[wf] == 7) continue;
      for (int l = 0; l < WF; l++) begin
        cmd_addr_i[l]  = addr_of((wf * WF + l) % K, 0);
        cmd_wdata_i[l] = '0;
      end
      unique case (pc[wf])
        0: begin  // TX.Begin, refused while another wavefront holds the lock
          if (wg_lock_o && wg_lock_wf_o != 2'(wf)) begin
            cmd_i = CMD_TX_BEGIN; cmd_wf_i = 2'(wf); cmd_exec_i = exec[wf]; cmd_valid_i = 1;
            @(posedge clk); #1;
            chk("begin stalled", 32'(cmd_ready_o), 0);
            cmd_valid_i = 0; c_stall++;
            continue;
          end
          vr_read(wf, 1, snap1[wf]);
          begin
            logic was_locked;
            was_locked = wg_lock_o;
            run_cmd(CMD_TX_BEGIN, wf, exec[wf], cyc);
            if (mode_o[wf] == MODE_WF_SERIAL) c_wfser++;
            if (mode_o[wf] == MODE_WG_SERIAL) begin
              c_wgser++;
              for (int w = 0; w < NW; w++)
                if (w != wf && pc[w] >= 1 && pc[w] <= 5) c_abort++;
            end
            if (!(mode_o[wf] == MODE_WG_SERIAL && !was_locked)) chk("begin latency", 32'(cyc), 2);
          end
          pc[wf] = 1;
        end
        1: begin  // register 1 is overwritten inside the transaction
          for (int l = 0; l < WF; l++) d[l] = 32'hDEAD0000 | 32'(wf * WF + l);
          vr_write(wf, 1, exec[wf] & ~tcm_o[wf], d);
          pc[wf] = 2;
        end
        2: begin  // read bucket counter into register 0
          run_cmd(CMD_LDS_READ, wf, exec[wf], cyc);
          vr_write(wf, 0, resp_done_o, resp_rdata_o);
          if (resp_conflict_o != '0) begin
            c_bcast++;
            vr_read(wf, 1, v);
            for (int l = 0; l < WF; l++) if (resp_conflict_o[l]) begin
              c_vrestore++;
              chk("register restored", v[l], snap1[wf][l]);
            end
          end
          pc[wf] = 3;
        end
        3: begin  // write counter + 1
          vr_read(wf, 0, v);
          for (int l = 0; l < WF; l++) cmd_wdata_i[l] = v[l] + 1;
          run_cmd(CMD_LDS_WRITE, wf, exec[wf], cyc);
          if (resp_conflict_o != '0) c_bcast++;
          pc[wf] = 4;
        end
        4: begin  // write own id into the bucket slot log
          for (int l = 0; l < WF; l++) begin
            cmd_addr_i[l]  = addr_of((wf * WF + l) % K, 8);
            cmd_wdata_i[l] = 32'(wf * WF + l);
          end
          run_cmd(CMD_LDS_WRITE, wf, exec[wf], cyc);
          if (resp_conflict_o != '0) c_bcast++;
          pc[wf] = 5;
        end
        5: begin  // write own id into a tally word shared by buckets of equal parity:
                  // lanes that already wrote their counter can conflict here
          for (int l = 0; l < WF; l++) begin
            cmd_addr_i[l]  = addr_of(16 + ((wf * WF + l) % K) % 2, 0);
            cmd_wdata_i[l] = 32'(wf * WF + l);
          end
          run_cmd(CMD_LDS_WRITE, wf, exec[wf], cyc);
          if (resp_conflict_o != '0) begin c_bcast++; c_late_conflict++; end
          pc[wf] = 6;
        end
        default: begin  // TX.Commit
          logic [WF-1:0] ex;
          ex = exec[wf];
          run_cmd(CMD_TX_COMMIT, wf, ex, cyc);
          if (resp_done_o != '0) c_commit_clear++;
          for (int l = 0; l < WF; l++) if (resp_done_o[l]) committed[wf * WF + l]++;
          if (resp_restart_o) begin
            c_restart++;
            exec[wf] = resp_exec_new_o;
            pc[wf] = 0;
          end else begin
            pc[wf] = 7; ndone++;
          end
        end
      endcase
    end
    chk("all wavefronts finished", 32'(ndone), NW);
    for (int i = 0; i < NWI; i++) chk("committed once", 32'(committed[i]), 1);
    for (int b = 0; b < K; b++) begin
      plain(0, addr_of(b, 0), 0, q);
      chk("bucket counter", q, 32'(expc[b]));
      plain(0, addr_of(b, 8), 0, q);
      chk("slot log owner bucket", 32'(q < NWI && (q % K) == b), 1);
    end
    for (int t = 0; t < 2 && t < K; t++) begin
      plain(0, addr_of(16 + t, 0), 0, q);
      chk("tally owner parity", 32'(q < NWI && ((q % K) % 2) == t), 1);
    end
  endtask

  // Banks work in parallel: a coalesced instruction (one lane per bank) takes
  // as long as a single lane, and 64 lanes over 32 banks take two rounds.
  task automatic parallel_banks;
    int c0, c1, c32, c64, cyc;
    logic [WF-1:0] m32;
    m32 = '0;
    for (int l = 0; l < NB; l++) m32[l] = 1'b1;
    for (int l = 0; l < WF; l++) cmd_addr_i[l] = addr_of(l % NB, 4 + l / NB);
    run_cmd(CMD_TX_BEGIN, 0, '1, cyc);
    run_cmd(CMD_LDS_READ, 0, '0, c0);           // no lane: no round
    run_cmd(CMD_LDS_READ, 0, 64'h1, c1);        // one new access
    for (int l = 0; l < WF; l++) cmd_addr_i[l] = addr_of(l % NB, 6 + l / NB);
    run_cmd(CMD_LDS_READ, 0, m32, c32);         // 32 new accesses, one per bank
    chk("coalesced lanes in parallel", 32'(c32), 32'(c1));
    for (int l = 0; l < WF; l++) cmd_addr_i[l] = addr_of(l % NB, 8 + 2 * (l / NB) + 1);
    run_cmd(CMD_LDS_READ, 0, '1, c64);          // two lanes per bank: two rounds
    chk("two rounds", 32'(c64 - c0), 32'(2 * (c1 - c0)));
    chk("no conflicts", 32'(resp_conflict_o), 0);
    run_cmd(CMD_TX_COMMIT, 0, '1, cyc);
    chk("commit without restart", 32'(resp_restart_o), 0);
    $display("LDS read: empty %0d, 1 lane %0d, 32 lanes %0d, 64 lanes %0d cycles", c0, c1, c32, c64);
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    parallel_banks();
    ht_run(4);
    $display("K=4 done at %0t", $time);
    ht_run(1);
    $display("new=%0d own=%0d false_own=%0d conflict=%0d plain=%0d multiround=%0d bcast=%0d",
             c_new, c_own, c_false_own, c_conflict, c_plain, c_multiround, c_bcast);
    $display("late_conflict=%0d", c_late_conflict);
    $display("restart=%0d wf_serial=%0d wg_serial=%0d abort=%0d stall=%0d commit_clear=%0d vrestore=%0d",
             c_restart, c_wfser, c_wgser, c_abort, c_stall, c_commit_clear, c_vrestore);
    need("new access", c_new);           need("owner hit", c_own);
    need("false owner hit", c_false_own); need("Bloom conflict", c_conflict);
    need("plain access", c_plain);       need("multi-round instruction", c_multiround);
    need("conflict broadcast", c_bcast); need("restart", c_restart);
    need("wavefront serialization", c_wfser);
    need("work-group serialization", c_wgser);
    need("abort of other wavefronts", c_abort);
    need("stalled TX.Begin", c_stall);   need("commit clear", c_commit_clear);
    need("register restore", c_vrestore);
    need("conflict after a completed write", c_late_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
