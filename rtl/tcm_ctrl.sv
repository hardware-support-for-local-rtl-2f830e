// Transaction conflict mask (TCM) and transactional mode of one wavefront.
//
// TCM holds one bit per work-item: 1 = the work-item hit a conflict in the
// current transaction and is quiesced. A work-item executes only when its EXEC
// bit is 1 and its TCM bit is 0 (active_o = exec_i & ~tcm).
//   TX.Begin (begin_i): a first begin clears TCM and TCM_OLD and enters TX
//     mode. A begin that retries after a failed commit saves TCM in TCM_OLD;
//     if TCM equals the previous TCM_OLD the wavefront escalates (TX -> wavefront
//     serialization -> work-group serialization) and only the lowest set TCM
//     bit is cleared, so exactly one conflicting work-item runs; otherwise TCM is
//     cleared and TX mode is used. A begin inside a transaction is flattened.
//   LDS conflicts (conflict_i) OR their lanes into TCM.
//   TX.Commit (commit_i): TCM == 0 commits (mode back to NORMAL). Otherwise
//     restart_o is 1 and exec_new_o (= TCM) is the EXEC for the retry from
//     TX.Begin. commit_mask_o = exec_i & ~TCM names the work-items that commit.
//   abort_i (another wavefront entered work-group serialization) marks every
//     work-item that entered the transaction as conflicted; the retry after such
//     an abort does not count towards escalation.
// begin_i, commit_i, conflict_i and abort_i act on the next clock edge; the
// combinational outputs are valid in the cycle of the command. The masks and
// modes follow the document's execution model and its worked example; TCM is
// kept until the next TX.Begin (as in the example) rather than cleared at the
// commit; nesting depth counting and the abort rule are this design's choices.
module tcm_ctrl
  import localtm_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] exec_i,        // current EXEC mask of the wavefront
  input  logic         begin_i,
  input  logic         commit_i,
  input  logic         conflict_i,
  input  logic [W-1:0] conflict_mask_i,
  input  logic         abort_i,
  output logic [W-1:0] tcm_o,
  output logic [W-1:0] tcm_old_o,
  output tx_mode_e     mode_o,
  output logic         in_tx_o,
  output logic [W-1:0] active_o,
  output logic         restart_o,
  output logic [W-1:0] exec_new_o,
  output logic [W-1:0] commit_mask_o
);

  logic [W-1:0] tcm, tcm_old, tx_exec;
  tx_mode_e     mode;
  logic         retry, aborted;
  logic [3:0]   depth;           // flattened nesting level

  assign tcm_o         = tcm;
  assign tcm_old_o     = tcm_old;
  assign mode_o        = mode;
  assign in_tx_o       = (mode != MODE_NORMAL) && !retry;
  assign active_o      = exec_i & ~tcm;
  assign restart_o     = in_tx_o && (depth == '0) && (tcm != '0);
  assign exec_new_o    = tcm;
  assign commit_mask_o = (in_tx_o && depth == '0) ? (exec_i & ~tcm) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcm     <= '0;
      tcm_old <= '0;
      tx_exec <= '0;
      mode    <= MODE_NORMAL;
      retry   <= 1'b0;
      aborted <= 1'b0;
      depth   <= '0;
    end else if (begin_i) begin
      if (in_tx_o) begin
        depth <= depth + 1'b1;                       // nested: flattened
      end else if (!retry) begin
        tcm     <= '0;
        tcm_old <= '0;
        mode    <= MODE_TX;
        tx_exec <= exec_i;
      end else begin
        retry   <= 1'b0;
        aborted <= 1'b0;
        tcm_old <= tcm;
        tx_exec <= exec_i;
        if (!aborted && tcm == tcm_old) begin
          tcm  <= tcm & (tcm - 1'b1);               // reset only one active bit
          mode <= (mode == MODE_TX) ? MODE_WF_SERIAL : MODE_WG_SERIAL;
        end else begin
          tcm  <= '0;
          mode <= MODE_TX;
        end
      end
    end else if (commit_i) begin
      if (in_tx_o) begin
        if (depth != '0) depth <= depth - 1'b1;
        else if (tcm == '0) mode <= MODE_NORMAL;     // every work-item committed
        else retry <= 1'b1;                         // roll back conflicted ones
      end
    end else if (abort_i) begin
      if (in_tx_o) begin
        tcm     <= tcm | tx_exec;
        aborted <= 1'b1;
      end
    end else if (conflict_i && in_tx_o) begin
      tcm <= tcm | conflict_mask_i;
    end
  end

endmodule
