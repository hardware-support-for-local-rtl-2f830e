// Hash-table workload (HT2 ... HT256) on gpu_localtm_lds at default size.
//
// 256 work-items (4 wavefronts) insert their ids into a table of B buckets,
// B = 2, 4, ..., 256; work-item i hashes to bucket i % B. Each bucket has
// 256 / B slots, enough for all its inserts. One transaction reads one slot of
// the work-item's bucket and, if it is empty, writes the id + 1 into it (a
// read-modify-write on a single word); a work-item that finds the slot taken
// commits and tries the next slot in a new transaction.
// Checked for every B: each id ends in exactly one slot of its own bucket,
// no slot holds a foreign or duplicated id, every work-item finishes. The
// number of committed and restarted transactions and serializations is
// printed per size.
module tb_workload_ht;
  import localtm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [8:0] n_vars_i = 9'd16;
  logic cmd_valid_i = 0, cmd_ready_o;
  cmd_e cmd_i = CMD_TX_BEGIN;
  logic [1:0] cmd_wf_i = '0;
  logic [63:0] cmd_exec_i = '0;
  logic [63:0][13:0] cmd_addr_i = '0;
  logic [63:0][31:0] cmd_wdata_i = '0;
  logic resp_valid_o, resp_restart_o;
  cmd_e resp_cmd_o;
  logic [1:0] resp_wf_o, wg_lock_wf_o;
  logic [63:0][31:0] resp_rdata_o;
  logic [63:0] resp_done_o, resp_conflict_o, resp_exec_new_o;
  logic [3:0][63:0] tcm_o;
  tx_mode_e [3:0] mode_o;
  logic wg_lock_o;
  logic [31:0] ev_valid_o;
  acc_res_e [31:0] ev_res_o;
  logic vr_wr_en_i = 0;
  logic [1:0] vr_wr_wf_i = '0, vr_wr_reg_i = '0, vr_rd_wf_i = '0, vr_rd_reg_i = '0;
  logic [63:0] vr_wr_mask_i = '0;
  logic [63:0][31:0] vr_wr_data_i = '0, vr_rd_data_o;

  gpu_localtm_lds dut (.*);

  int checks = 0, failures = 0;
  localparam int NSTEPS = 2;
  int B, CAP;
  int pos [256];             // next slot to probe
  bit finished [256];
  bit saw_empty [256];

  always #5 clk = ~clk;
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int slot_addr(input int b, input int s);
    return b * CAP + s;
  endfunction

  `include "ltm_core_driver.svh"

  task automatic on_begin(input int wf, input logic [63:0] ex);
    for (int l = 0; l < 64; l++) saw_empty[wf * 64 + l] = 0;
  endtask

  task automatic body_step(input int wf, input int step, input logic [63:0] act);
    logic [63:0] m;
    m = '0;
    for (int l = 0; l < 64; l++) begin
      int wi;
      wi = wf * 64 + l;
      cmd_addr_i[l]  = 14'(slot_addr(wi % B, pos[wi]));
      cmd_wdata_i[l] = 32'(wi + 1);
      if (step == 1 && act[l] && saw_empty[wi]) m[l] = 1;
    end
    if (step == 0) begin
      run_cmd(CMD_LDS_READ, wf, act);
      for (int l = 0; l < 64; l++)
        if (resp_done_o[l]) saw_empty[wf * 64 + l] = (resp_rdata_o[l] == 0);
    end else if (m != '0) begin
      run_cmd(CMD_LDS_WRITE, wf, m);      // if (slot empty) slot = id + 1
    end
  endtask

  task automatic on_commit(input int wf, input logic [63:0] done);
    for (int l = 0; l < 64; l++) if (done[l]) begin
      int wi;
      wi = wf * 64 + l;
      if (saw_empty[wi]) finished[wi] = 1;
      else pos[wi]++;
    end
  endtask

  function automatic logic [63:0] next_exec(input int wf);
    logic [63:0] m;
    for (int l = 0; l < 64; l++) m[l] = !finished[wf * 64 + l];
    return m;
  endfunction

  initial begin
    logic [31:0] q;
    int seen [256];
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    for (B = 2; B <= 256; B = B * 2) begin
      int c0, r0, s0, w0, g0, t0;
      CAP = 256 / B;
      c0 = n_commits; r0 = n_restarts; w0 = n_wfser; g0 = n_wgser; s0 = n_stalls;
      t0 = $time;
      for (int a = 0; a < 256; a++) plain(1, a, 0, q);
      for (int i = 0; i < 256; i++) begin pos[i] = 0; finished[i] = 0; seen[i] = 0; end
      run_program(400000);
      for (int b = 0; b < B; b++)
        for (int s = 0; s < CAP; s++) begin
          plain(0, slot_addr(b, s), 0, q);
          checks++;
          if (q == 0 || q > 256 || ((q - 1) % B) != b) begin
            failures++; $display("FAIL HT%0d slot %0d/%0d holds %0d", B, b, s, q);
          end else seen[q - 1]++;
        end
      for (int i = 0; i < 256; i++) chk("id stored once", seen[i], 1);
      $display("HT%0d: %0d cycles, commits=%0d restarts=%0d wf_serial=%0d wg_serial=%0d stalls=%0d",
               B, ($time - t0) / 10, n_commits - c0, n_restarts - r0, n_wfser - w0,
               n_wgser - g0, n_stalls - s0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
