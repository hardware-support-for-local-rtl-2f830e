// Self-checking test of lds_bank_tm (512-word bank, 256 work-items, 8-bit
// signatures, N = 24 variable words). A reference model of the bank kept in
// the test (variables, backups, owners, valid flags, signatures with hash
// row % 8) predicts, for random transactional and plain accesses, restore
// scans and clear scans: the outcome (conflict / new / owner hit / false owner
// hit / plain), the read data, the number of shadow entries handled and the
// number of cycles from acceptance to response. Plain reads of the backup rows
// (k + N) and of the owner bytes (byte k after word 2N) check the shadow
// layout in the array itself.
module tb_lds_bank_tm;
  import localtm_pkg::*;

  localparam int WORDS = 512, NWI = 256, N = 24;
  logic clk = 0, rst_n = 0;
  logic [8:0] n_vars = 9'(N);
  logic req_valid = 0, req_ready;
  bank_op_e req_op = BOP_ACCESS;
  logic req_tx = 0, req_we = 0;
  logic [7:0] req_wi = '0;
  logic [8:0] req_row = '0;
  logic [31:0] req_wdata = '0;
  logic [NWI-1:0] req_sel = '0;
  logic resp_valid;
  logic [31:0] resp_rdata;
  acc_res_e resp_res;
  logic [8:0] resp_entries;

  lds_bank_tm #(.WORDS(WORDS), .NWI(NWI)) dut (.*);

  int checks = 0, failures = 0;
  int n_res [5];
  // reference model
  logic [31:0] r_mem [WORDS];
  logic [31:0] r_bkp [N];
  logic [7:0]  r_own [N];
  logic        r_vld [N];
  logic [7:0]  r_sig [NWI];
  int pool [6] = '{3, 17, 64, 130, 200, 255};

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // drive one request and wait for the response; returns cycles taken
  task automatic issue(output int cyc);
    req_valid = 1;
    @(posedge clk); #1 req_valid = 0;
    cyc = 0;
    do begin
      @(posedge clk); #1 cyc++;
    end while (!resp_valid && cyc < 5000);
  endtask

  task automatic access(input bit tx, input int wi, input int row, input bit we, input logic [31:0] wd);
    acc_res_e exp_res;
    int exp_cyc, cyc;
    logic [31:0] exp_rd;
    logic other, own;
    int h;
    h = row % 8;
    other = 0;
    for (int w = 0; w < NWI; w++) if (w != wi && r_sig[w][h]) other = 1;
    own = r_sig[wi][h];
    exp_rd = r_mem[row];
    if (!tx || row >= N) begin
      exp_res = ACC_PLAIN; exp_cyc = we ? 1 : 2;
    end else if (other) begin
      exp_res = ACC_CONFLICT; exp_cyc = 1;
    end else if (own && r_vld[row] && r_own[row] == 8'(wi)) begin
      exp_res = ACC_OWN; exp_cyc = we ? 2 : 3;
    end else begin
      exp_res = own ? ACC_FALSE_OWN : ACC_NEW;
      exp_cyc = (we ? 4 : 3) + ((own && r_vld[row]) ? 1 : 0);
    end
    req_op = BOP_ACCESS; req_tx = tx; req_we = we; req_wi = 8'(wi);
    req_row = 9'(row); req_wdata = wd;
    issue(cyc);
    chk("outcome", 32'(resp_res), 32'(exp_res));
    chk("latency", 32'(cyc), 32'(exp_cyc));
    // the shadow area is checked against the backups and owners instead
    if (!we && exp_res != ACC_CONFLICT && !(row >= N && row < 2 * N + (N + 3) / 4))
      chk("rdata", resp_rdata, exp_rd);
    n_res[exp_res]++;
    // update the model
    if (exp_res == ACC_NEW || exp_res == ACC_FALSE_OWN) begin
      r_bkp[row] = r_mem[row]; r_own[row] = 8'(wi); r_vld[row] = 1; r_sig[wi][h] = 1;
    end
    if (exp_res != ACC_CONFLICT && we) r_mem[row] = wd;
  endtask

  task automatic scan(input bank_op_e op, input logic [NWI-1:0] sel);
    int exp_cyc, exp_ent, cyc;
    exp_cyc = 1; exp_ent = 0;
    for (int i = 0; i < (N + 3) / 4; i++) begin
      int m, v;
      m = 0; v = 0;
      for (int j = 0; j < 4; j++) begin
        int k;
        k = 4 * i + j;
        if (k < N && r_vld[k]) begin
          v = 1;
          if (sel[r_own[k]]) begin
            m++;
            if (op == BOP_RESTORE) r_mem[k] = r_bkp[k];
            r_vld[k] = 0;
          end
        end
      end
      exp_ent += m;
      if (v == 0) exp_cyc += 1;
      else if (op == BOP_CLEAR) exp_cyc += 2;
      else exp_cyc += 3 + 2 * m;
    end
    for (int w = 0; w < NWI; w++) if (sel[w]) r_sig[w] = '0;
    req_op = op; req_sel = sel;
    issue(cyc);
    chk("scan entries", 32'(resp_entries), 32'(exp_ent));
    chk("scan latency", 32'(cyc), 32'(exp_cyc));
    req_sel = '0;
  endtask

  // check backups and owner bytes through plain reads of the shadow area
  task automatic check_layout;
    for (int k = 0; k < N; k++) if (r_vld[k]) begin
      access(0, 0, k + N, 0, 0);
      chk("backup row", resp_rdata, r_bkp[k]);
      access(0, 0, 2 * N + k / 4, 0, 0);
      chk("owner byte", 32'(resp_rdata[8 * (k % 4) +: 8]), 32'(r_own[k]));
    end
  endtask

  initial begin
    logic [NWI-1:0] sel;
    for (int w = 0; w < NWI; w++) r_sig[w] = '0;
    for (int k = 0; k < N; k++) begin r_vld[k] = 0; r_own[k] = 0; r_bkp[k] = 0; end
    for (int i = 0; i < 5; i++) n_res[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk("ready", 32'(req_ready), 1);
    // initialise the whole bank with plain writes
    for (int a = 0; a < WORDS; a++) begin
      logic [31:0] d;
      d = $urandom;
      access(0, 0, a, 1, d);
      r_mem[a] = d;
    end
    // directed: new access, owner hit, conflict, false positive, restore
    access(1, 3, 1, 1, 32'hAAAA0001);            // new (write)
    access(1, 3, 1, 0, 0);                       // owner hit (read)
    access(1, 17, 9, 0, 0);                      // row 9 hashes like row 1: conflict
    access(1, 3, 9, 1, 32'hBBBB0009);            // own filter, no entry: false owner
    check_layout();
    sel = '0; sel[3] = 1;
    scan(BOP_RESTORE, sel);
    access(0, 0, 1, 0, 0);                       // value restored
    access(1, 17, 9, 0, 0);                      // signature cleared: new
    sel = '0; sel[17] = 1;
    scan(BOP_CLEAR, sel);
    // random
    for (int it = 0; it < 4000; it++) begin
      int unsigned r;
      r = $urandom_range(0, 99);
      if (r < 75)
        access(1, pool[$urandom_range(0, 5)], $urandom_range(0, N - 1), 1'($urandom_range(0, 1)), $urandom);
      else if (r < 80)
        access(0, 0, $urandom_range(0, WORDS - 1), 0, 0);
      else if (r < 83) begin
        int a;
        logic [31:0] d;
        a = $urandom_range(3 * N, WORDS - 1); d = $urandom;
        access(0, 0, a, 1, d);
      end else if (r < 85) check_layout();
      else begin
        sel = '0;
        for (int p = 0; p < 6; p++) if ($urandom_range(0, 2) == 0) sel[pool[p]] = 1;
        scan((r < 93) ? BOP_RESTORE : BOP_CLEAR, sel);
      end
    end
    for (int i = 1; i < 5; i++) begin
      checks++;
      if (n_res[i] == 0) begin failures++; $display("FAIL outcome %0d never seen", i); end
    end
    $display("outcomes: plain=%0d new=%0d own=%0d false_own=%0d conflict=%0d",
             n_res[0], n_res[1], n_res[2], n_res[3], n_res[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
