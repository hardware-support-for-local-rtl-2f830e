// Self-checking test of tcm_ctrl on a 4-work-item wavefront.
// It replays the worked example of the execution model (if-then-else inside a
// transaction, work-items 2 and 3 conflicting twice, wavefront serialization,
// final commit), then an escalation to work-group serialization, an abort,
// and a flattened nested transaction. Masks are written WI0-first as strings
// ("1100" = WI0 and WI1) and converted, so expected values do not come from
// the block.
module tb_tcm_ctrl;
  import localtm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] exec_i = '0, conflict_mask_i = '0;
  logic begin_i = 0, commit_i = 0, conflict_i = 0, abort_i = 0;
  logic [3:0] tcm_o, tcm_old_o, active_o, exec_new_o, commit_mask_o;
  tx_mode_e mode_o;
  logic in_tx_o, restart_o;
  int checks = 0, failures = 0;

  tcm_ctrl #(.W(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] m(input string s);
    logic [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = (s[i] == "1");
    return r;
  endfunction

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic step;
    @(posedge clk); #1;
    begin_i = 0; commit_i = 0; conflict_i = 0; abort_i = 0;
  endtask

  task automatic tx_begin(input string ex);
    exec_i = m(ex); begin_i = 1; step();
  endtask
  task automatic conflict(input string cm);
    conflict_mask_i = m(cm); conflict_i = 1; step();
  endtask
  // commit with the given EXEC; checks restart and new EXEC in the commit cycle
  task automatic tx_commit(input string ex, input logic exp_restart, input string exp_exec);
    exec_i = m(ex); commit_i = 1; #1;
    chk("restart", 32'(restart_o), 32'(exp_restart));
    if (exp_restart) chk("exec_new", 32'(exec_new_o), 32'(m(exp_exec)));
    else             chk("commit_mask", 32'(commit_mask_o), 32'(m(ex) & ~tcm_o));
    step();
  endtask
  task automatic state(input string tcm, input string old, input tx_mode_e md);
    chk("tcm", 32'(tcm_o), 32'(m(tcm)));
    chk("tcm_old", 32'(tcm_old_o), 32'(m(old)));
    chk("mode", 32'(mode_o), 32'(md));
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk("reset mode", 32'(mode_o), 32'(MODE_NORMAL));
    // ---- worked example -------------------------------------------------
    tx_begin("1111");             state("0000", "0000", MODE_TX);
    exec_i = m("0011"); #1 chk("active", 32'(active_o), 32'(m("0011")));
    conflict("0011");             state("0011", "0000", MODE_TX);
    exec_i = m("0011"); #1 chk("active masked", 32'(active_o), 32'(m("0000")));
    tx_commit("1111", 1, "0011"); state("0011", "0000", MODE_TX);
    tx_begin("0011");             state("0000", "0011", MODE_TX);
    conflict("0011");             state("0011", "0011", MODE_TX);
    tx_commit("0011", 1, "0011");
    tx_begin("0011");             state("0001", "0011", MODE_WF_SERIAL);
    exec_i = m("0011"); #1 chk("serial active", 32'(active_o), 32'(m("0010")));
    tx_commit("0011", 1, "0001");
    tx_begin("0001");             state("0000", "0001", MODE_TX);
    tx_commit("0001", 0, "");     chk("mode after commit", 32'(mode_o), 32'(MODE_NORMAL));
    // ---- escalation to work-group serialization ---------------------------
    tx_begin("1111");
    conflict("0011"); tx_commit("1111", 1, "0011");
    tx_begin("0011"); conflict("0011"); tx_commit("0011", 1, "0011");
    tx_begin("0011");             state("0001", "0011", MODE_WF_SERIAL);
    conflict("0010");             state("0011", "0011", MODE_WF_SERIAL);
    tx_commit("0011", 1, "0011");
    tx_begin("0011");             state("0001", "0011", MODE_WG_SERIAL);
    tx_commit("0011", 1, "0001");
    tx_begin("0001");             state("0000", "0001", MODE_TX);
    tx_commit("0001", 0, "");
    // ---- abort by another wavefront --------------------------------------
    tx_begin("0111");
    abort_i = 1; step();          state("0111", "0000", MODE_TX);
    tx_commit("0111", 1, "0111");
    tx_begin("0111");             state("0000", "0111", MODE_TX);
    abort_i = 1; step();
    tx_commit("0111", 1, "0111");
    tx_begin("0111");             state("0000", "0111", MODE_TX);  // no escalation
    tx_commit("0111", 0, "");
    // ---- flattened nesting ----------------------------------------------
    tx_begin("1111");
    tx_begin("1111");             state("0000", "0000", MODE_TX);
    exec_i = m("1111"); commit_i = 1; #1 chk("inner restart", 32'(restart_o), 0);
    chk("inner commit mask", 32'(commit_mask_o), 0); step();
    chk("inner commit keeps TX", 32'(mode_o), 32'(MODE_TX));
    conflict("1000");
    tx_commit("1111", 1, "1000");
    // conflicts outside a transaction are ignored
    tx_begin("1000"); tx_commit("1000", 0, "");
    conflict("1111");             state("0000", "1000", MODE_NORMAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
