// K-means update workload (KM2 ... KM256) on gpu_localtm_lds at default size.
//
// 256 work-items each own one random 3-D point. Outside the transaction a
// work-item finds its closest of K centres (K = 2, 4, ..., 256). The
// transaction adds the point into that centre's accumulators: it reads the
// x, y and z sums and the member count, then writes them back updated
// (read-modify-write on four words). The four words of centre c sit in one
// bank (bank c % 32, rows 4*(c/32) .. 4*(c/32)+3), so different centres in the
// same bank alias in the Bloom signatures, which causes false conflicts.
// Checked for every K: each centre's sums and count equal the totals computed
// here from the points; every work-item commits once.
module tb_workload_km;
  import localtm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [8:0] n_vars_i = 9'd32;
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
  localparam int NSTEPS = 8;
  int K;
  int px [256], py [256], pz [256], cen [256];
  logic [31:0] rd [256][4];
  bit finished [256];

  always #5 clk = ~clk;
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int acc_addr(input int c, input int d);
    return (4 * (c / 32) + d) * 32 + (c % 32);
  endfunction

  `include "ltm_core_driver.svh"

  task automatic on_begin(input int wf, input logic [63:0] ex);
  endtask

  task automatic body_step(input int wf, input int step, input logic [63:0] act);
    int d;
    d = step % 4;
    for (int l = 0; l < 64; l++) begin
      int wi, inc;
      wi = wf * 64 + l;
      inc = (d == 0) ? px[wi] : (d == 1) ? py[wi] : (d == 2) ? pz[wi] : 1;
      cmd_addr_i[l]  = 14'(acc_addr(cen[wi], d));
      cmd_wdata_i[l] = rd[wi][d] + 32'(inc);
    end
    if (step < 4) begin
      run_cmd(CMD_LDS_READ, wf, act);
      for (int l = 0; l < 64; l++) if (resp_done_o[l]) rd[wf * 64 + l][d] = resp_rdata_o[l];
    end else run_cmd(CMD_LDS_WRITE, wf, act);
  endtask

  task automatic on_commit(input int wf, input logic [63:0] done);
    for (int l = 0; l < 64; l++) if (done[l]) begin
      checks++;
      if (finished[wf * 64 + l]) begin failures++; $display("FAIL committed twice"); end
      finished[wf * 64 + l] = 1;
    end
  endtask

  function automatic logic [63:0] next_exec(input int wf);
    logic [63:0] m;
    for (int l = 0; l < 64; l++) m[l] = !finished[wf * 64 + l];
    return m;
  endfunction

  initial begin
    logic [31:0] q;
    int cx [256], cy [256], cz [256];
    longint sx [256], sy [256], sz [256], sn [256];
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 256; i++) begin
      px[i] = $urandom_range(0, 1023); py[i] = $urandom_range(0, 1023); pz[i] = $urandom_range(0, 1023);
    end
    for (K = 2; K <= 256; K = K * 2) begin
      int c0, r0, t0, w0;
      c0 = n_commits; r0 = n_restarts; w0 = n_wfser; t0 = $time;
      for (int c = 0; c < K; c++) begin
        cx[c] = $urandom_range(0, 1023); cy[c] = $urandom_range(0, 1023); cz[c] = $urandom_range(0, 1023);
        sx[c] = 0; sy[c] = 0; sz[c] = 0; sn[c] = 0;
        for (int d = 0; d < 4; d++) plain(1, acc_addr(c, d), 0, q);
      end
      for (int i = 0; i < 256; i++) begin
        longint best, dsq;
        best = -1;
        for (int c = 0; c < K; c++) begin
          dsq = longint'(px[i] - cx[c]) ** 2 + longint'(py[i] - cy[c]) ** 2 + longint'(pz[i] - cz[c]) ** 2;
          if (best < 0 || dsq < best) begin best = dsq; cen[i] = c; end
        end
        sx[cen[i]] += px[i]; sy[cen[i]] += py[i]; sz[cen[i]] += pz[i]; sn[cen[i]]++;
        finished[i] = 0;
      end
      run_program(400000);
      for (int c = 0; c < K; c++) begin
        plain(0, acc_addr(c, 0), 0, q); chk("sum x", q, sx[c]);
        plain(0, acc_addr(c, 1), 0, q); chk("sum y", q, sy[c]);
        plain(0, acc_addr(c, 2), 0, q); chk("sum z", q, sz[c]);
        plain(0, acc_addr(c, 3), 0, q); chk("count", q, sn[c]);
      end
      for (int i = 0; i < 256; i++) chk("committed", finished[i], 1);
      $display("KM%0d: %0d cycles, commits=%0d restarts=%0d wf_serial=%0d",
               K, ($time - t0) / 10, n_commits - c0, n_restarts - r0, n_wfser - w0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
