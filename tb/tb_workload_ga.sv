// Genetic-algorithm workload (GA2 ... GA256) on gpu_localtm_lds at default size.
//
// A set of S candidate solutions (S = 2, 4, ..., 256) of a knapsack problem
// with 8 objects lives in local memory, one word per solution whose 8 low bits
// say which objects are in the bag. Each of the 256 work-items picks two
// different solutions, and in one transaction reads both, ranks them by how
// close their weight comes to the bag capacity without exceeding it, crosses
// the better one into the worse one (low four object bits taken from the
// better) and writes both back.
// Checked for every S: serializability. Every committed transaction's reads
// and writes are recorded with its commit order; replaying them in that order
// on a reference copy must reproduce exactly the values each transaction read,
// and the final set must equal the replayed one.
module tb_workload_ga;
  import localtm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [8:0] n_vars_i = 9'd8;
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
  localparam int NSTEPS = 4;
  localparam int CAPACITY = 100;
  int S;
  int wgt [8] = '{13, 27, 8, 41, 19, 33, 5, 22};
  int si [256], sj [256];
  logic [31:0] ri [256], rj [256], wi_v [256], wj_v [256];
  bit finished [256];
  // commit log
  longint log_seq [$];
  int log_wi [$];

  always #5 clk = ~clk;
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fitness(input logic [31:0] sol);
    int w;
    w = 0;
    for (int o = 0; o < 8; o++) if (sol[o]) w += wgt[o];
    return (w > CAPACITY) ? -1000 - w : w;
  endfunction

  `include "ltm_core_driver.svh"

  task automatic on_begin(input int wf, input logic [63:0] ex);
  endtask

  task automatic body_step(input int wf, input int step, input logic [63:0] act);
    for (int l = 0; l < 64; l++) begin
      int w;
      w = wf * 64 + l;
      cmd_addr_i[l]  = 14'((step % 2 == 0) ? si[w] : sj[w]);
      cmd_wdata_i[l] = (step % 2 == 0) ? wi_v[w] : wj_v[w];
    end
    if (step < 2) begin
      run_cmd(CMD_LDS_READ, wf, act);
      for (int l = 0; l < 64; l++) if (resp_done_o[l]) begin
        int w;
        w = wf * 64 + l;
        if (step == 0) ri[w] = resp_rdata_o[l]; else rj[w] = resp_rdata_o[l];
      end
      if (step == 1)
        for (int l = 0; l < 64; l++) begin
          int w;
          w = wf * 64 + l;
          if (fitness(ri[w]) >= fitness(rj[w])) begin
            wi_v[w] = ri[w]; wj_v[w] = {rj[w][31:4], ri[w][3:0]};
          end else begin
            wj_v[w] = rj[w]; wi_v[w] = {ri[w][31:4], rj[w][3:0]};
          end
        end
    end else run_cmd(CMD_LDS_WRITE, wf, act);
  endtask

  task automatic on_commit(input int wf, input logic [63:0] done);
    for (int l = 0; l < 64; l++) if (done[l]) begin
      finished[wf * 64 + l] = 1;
      log_seq.push_back(commit_seq);
      log_wi.push_back(wf * 64 + l);
    end
  endtask

  function automatic logic [63:0] next_exec(input int wf);
    logic [63:0] m;
    for (int l = 0; l < 64; l++) m[l] = !finished[wf * 64 + l];
    return m;
  endfunction

  initial begin
    logic [31:0] q;
    logic [31:0] refs [256];
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    for (S = 2; S <= 256; S = S * 2) begin
      int c0, r0, t0, w0, g0;
      c0 = n_commits; r0 = n_restarts; w0 = n_wfser; g0 = n_wgser; t0 = $time;
      log_seq.delete(); log_wi.delete();
      for (int s = 0; s < S; s++) begin
        refs[s] = 32'($urandom_range(0, 255));
        plain(1, s, refs[s], q);
      end
      for (int w = 0; w < 256; w++) begin
        si[w] = $urandom_range(0, S - 1);
        sj[w] = (si[w] + $urandom_range(1, S - 1)) % S;
        finished[w] = 0;
      end
      run_program(400000);
      // replay in commit order (log is already in commit order)
      for (int k = 0; k < log_wi.size(); k++) begin
        int w;
        w = log_wi[k];
        chk("read of solution i", ri[w], refs[si[w]]);
        chk("read of solution j", rj[w], refs[sj[w]]);
        refs[si[w]] = wi_v[w];
        refs[sj[w]] = wj_v[w];
      end
      chk("transactions committed", log_wi.size(), 256);
      for (int s = 0; s < S; s++) begin
        plain(0, s, 0, q);
        chk("final solution", q, refs[s]);
      end
      $display("GA%0d: %0d cycles, commits=%0d restarts=%0d wf_serial=%0d wg_serial=%0d",
               S, ($time - t0) / 10, n_commits - c0, n_restarts - r0, n_wfser - w0, n_wgser - g0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
