// Local data share (LDS) of one compute unit with hardware transactional
// memory for the work-items of one work-group.
//
// Wavefronts of a work-group mark critical sections with TX.Begin and
// TX.Commit. Inside a transaction every LDS access is transactional: each of
// the NUM_BANKS banks (lds_bank_tm) checks the access against the 256 Bloom
// signatures of the work-group, backs up the old value in its shadow area the
// first time a work-item touches a word, and reports a conflict when another
// work-item's signature hits. Conflicting work-items get their TCM bit set
// (tcm_ctrl, one per wavefront), are quiesced, and their backups in every bank
// and their vector registers (shadow_vreg) are restored. At TX.Commit the
// work-items that finished cleanly drop their shadow entries and signatures;
// the conflicted ones restart from TX.Begin with EXEC = TCM. Repeated
// identical TCM masks escalate to wavefront serialization and then to
// work-group serialization, where this unit holds a lock, aborts the
// transactions of the other wavefronts and stalls their TX.Begin.
//
// Command interface (one command at a time, valid/ready):
//   CMD_TX_BEGIN / CMD_TX_COMMIT for wavefront cmd_wf_i, with its EXEC mask.
//   CMD_LDS_READ / CMD_LDS_WRITE: one address (word address, bank = addr %
//   NUM_BANKS, row = addr / NUM_BANKS) and write data per lane; lanes active
//   are EXEC & ~TCM. Lanes mapped to the same bank are served in successive
//   rounds (lds_bank_sched), all banks in parallel.
// Response (resp_valid_o, one cycle): read data, lanes done, lanes that
// conflicted, and for a commit whether to restart and the new EXEC.
// TX.Begin answers in 2 cycles after acceptance, plus the restore scan when it
// enters work-group serialization; TX.Commit answers after the clear scan of
// the slowest bank; an LDS instruction after its rounds plus, if any lane
// conflicted, the broadcast restore scan of the slowest bank.
// The bank organisation, masks, modes and stages follow the document. The
// command/response interface, lowest-lane bank arbitration, restoring both
// memory and registers at the conflict broadcast, and the abort of other
// wavefronts through their TCM are this design's choices.
module gpu_localtm_lds
  import localtm_pkg::*;
#(
  parameter int unsigned NUM_BANKS  = LTM_NUM_BANKS,
  parameter int unsigned BANK_WORDS = LTM_BANK_WORDS,
  parameter int unsigned WF_SIZE    = LTM_WF_SIZE,
  parameter int unsigned NUM_WF     = LTM_NUM_WF,
  parameter int unsigned VREGS      = 4,
  localparam int unsigned NWI = WF_SIZE * NUM_WF,
  localparam int unsigned IW  = $clog2(NWI),
  localparam int unsigned RW  = $clog2(BANK_WORDS),
  localparam int unsigned BW  = $clog2(NUM_BANKS),
  localparam int unsigned AW  = RW + BW,
  localparam int unsigned LW  = $clog2(WF_SIZE),
  localparam int unsigned FW  = (NUM_WF > 1) ? $clog2(NUM_WF) : 1,
  localparam int unsigned VW  = (VREGS > 1) ? $clog2(VREGS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [RW-1:0]             n_vars_i,     // variable words per bank (N)
  // command
  input  logic                      cmd_valid_i,
  output logic                      cmd_ready_o,
  input  cmd_e                      cmd_i,
  input  logic [FW-1:0]             cmd_wf_i,
  input  logic [WF_SIZE-1:0]        cmd_exec_i,
  input  logic [WF_SIZE-1:0][AW-1:0] cmd_addr_i,
  input  logic [WF_SIZE-1:0][31:0]  cmd_wdata_i,
  // response
  output logic                      resp_valid_o,
  output cmd_e                      resp_cmd_o,
  output logic [FW-1:0]             resp_wf_o,
  output logic [WF_SIZE-1:0][31:0]  resp_rdata_o,
  output logic [WF_SIZE-1:0]        resp_done_o,
  output logic [WF_SIZE-1:0]        resp_conflict_o,
  output logic                      resp_restart_o,
  output logic [WF_SIZE-1:0]        resp_exec_new_o,
  // transactional state
  output logic [NUM_WF-1:0][WF_SIZE-1:0] tcm_o,
  output tx_mode_e [NUM_WF-1:0]     mode_o,
  output logic                      wg_lock_o,
  output logic [FW-1:0]             wg_lock_wf_o,
  // per-bank access outcomes (valid when ev_valid_o[b])
  output logic [NUM_BANKS-1:0]      ev_valid_o,
  output acc_res_e [NUM_BANKS-1:0]  ev_res_o,
  // vector register file (shadowed)
  input  logic                      vr_wr_en_i,
  input  logic [FW-1:0]             vr_wr_wf_i,
  input  logic [VW-1:0]             vr_wr_reg_i,
  input  logic [WF_SIZE-1:0]        vr_wr_mask_i,
  input  logic [WF_SIZE-1:0][31:0]  vr_wr_data_i,
  input  logic [FW-1:0]             vr_rd_wf_i,
  input  logic [VW-1:0]             vr_rd_reg_i,
  output logic [WF_SIZE-1:0][31:0]  vr_rd_data_o
);

  typedef enum logic [3:0] {
    T_IDLE, T_BEGIN2, T_ABORT2, T_ROUND, T_WAIT, T_LDS_END, T_BCAST,
    T_SCAN, T_SCANW, T_RESP
  } tstate_e;

  tstate_e                    st;
  cmd_e                       cmd_q;
  logic [FW-1:0]              wf_q;
  logic [WF_SIZE-1:0]         exec_q;
  logic [WF_SIZE-1:0][AW-1:0] addr_q;
  logic [WF_SIZE-1:0][31:0]   wdata_q;
  logic                       tx_q;
  logic [WF_SIZE-1:0]         pending, done_q, conf_q;
  logic [WF_SIZE-1:0][31:0]   rdata_q;
  logic [NUM_BANKS-1:0]       outst;
  logic [NUM_BANKS-1:0][LW-1:0] lane_q;
  logic [NWI-1:0]             sel_q;
  bank_op_e                   scan_op_q;
  logic                       restart_q;
  logic [WF_SIZE-1:0]         exec_new_q;
  logic                       lock_q;
  logic [FW-1:0]              lock_wf_q;

  // ---------------------------------------------------------------- wavefronts
  logic [NUM_WF-1:0]              wf_begin, wf_commit, wf_conflict, wf_abort;
  logic [NUM_WF-1:0][WF_SIZE-1:0] wf_tcm, wf_active, wf_exec_new, wf_commit_mask;
  logic [NUM_WF-1:0]              wf_in_tx, wf_restart;
  logic [NUM_WF-1:0]              vr_backup, vr_restore;
  logic [NUM_WF-1:0][WF_SIZE-1:0] vr_restore_mask;
  logic [NUM_WF-1:0][WF_SIZE-1:0][31:0] vr_rd;

  logic accept;
  assign accept = cmd_valid_i && cmd_ready_o;

  for (genvar w = 0; w < NUM_WF; w++) begin : g_wf
    logic [WF_SIZE-1:0] tcm_old_unused;
    tcm_ctrl #(.W(WF_SIZE)) u_tcm (
      .clk, .rst_n,
      .exec_i          ((accept && cmd_wf_i == FW'(w)) ? cmd_exec_i : exec_q),
      .begin_i         (wf_begin[w]),
      .commit_i        (wf_commit[w]),
      .conflict_i      (wf_conflict[w]),
      .conflict_mask_i (conf_q),
      .abort_i         (wf_abort[w]),
      .tcm_o           (wf_tcm[w]),
      .tcm_old_o       (tcm_old_unused),
      .mode_o          (mode_o[w]),
      .in_tx_o         (wf_in_tx[w]),
      .active_o        (wf_active[w]),
      .restart_o       (wf_restart[w]),
      .exec_new_o      (wf_exec_new[w]),
      .commit_mask_o   (wf_commit_mask[w])
    );

    shadow_vreg #(.NREGS(VREGS), .LANES(WF_SIZE)) u_vreg (
      .clk, .rst_n,
      .wr_en_i        (vr_wr_en_i && vr_wr_wf_i == FW'(w)),
      .wr_reg_i       (vr_wr_reg_i),
      .wr_mask_i      (vr_wr_mask_i),
      .wr_data_i      (vr_wr_data_i),
      .rd_reg_i       (vr_rd_reg_i),
      .rd_data_o      (vr_rd[w]),
      .backup_i       (vr_backup[w]),
      .restore_i      (vr_restore[w]),
      .restore_mask_i (vr_restore_mask[w])
    );
  end

  assign tcm_o        = wf_tcm;
  assign vr_rd_data_o = vr_rd[vr_rd_wf_i];
  assign wg_lock_o    = lock_q;
  assign wg_lock_wf_o = lock_wf_q;

  // ------------------------------------------------------------------- banks
  logic [NUM_BANKS-1:0]         grant;
  logic [NUM_BANKS-1:0][LW-1:0] grant_lane;
  logic [WF_SIZE-1:0]           issued;

  lds_bank_sched #(.LANES(WF_SIZE), .NBANKS(NUM_BANKS), .AW(AW)) u_sched (
    .pending_i (pending),
    .addr_i    (addr_q),
    .grant_o   (grant),
    .lane_o    (grant_lane),
    .issued_o  (issued)
  );

  logic [NUM_BANKS-1:0]         b_req, b_resp;
  logic [NUM_BANKS-1:0][31:0]   b_rdata;
  acc_res_e [NUM_BANKS-1:0]     b_res;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic          ready_unused;
    logic [RW-1:0] entries_unused;
    logic [LW-1:0] ln;
    assign ln = grant_lane[b];
    lds_bank_tm #(.WORDS(BANK_WORDS), .NWI(NWI)) u_bank (
      .clk, .rst_n,
      .n_vars       (n_vars_i),
      .req_valid    (b_req[b]),
      .req_ready    (ready_unused),
      .req_op       ((st == T_SCAN) ? scan_op_q : BOP_ACCESS),
      .req_tx       (tx_q),
      .req_we       (cmd_q == CMD_LDS_WRITE),
      .req_wi       (IW'({wf_q, ln})),
      .req_row      (addr_q[ln][AW-1:BW]),
      .req_wdata    (wdata_q[ln]),
      .req_sel      (sel_q),
      .resp_valid   (b_resp[b]),
      .resp_rdata   (b_rdata[b]),
      .resp_res     (b_res[b]),
      .resp_entries (entries_unused)
    );
  end

  assign ev_valid_o = b_resp & ~{NUM_BANKS{st == T_SCANW}};
  assign ev_res_o   = b_res;

  always_comb begin
    b_req = '0;
    if (st == T_ROUND && pending != '0) b_req = grant;
    if (st == T_SCAN)                   b_req = '1;
  end

  // -------------------------------------------------------- control signals
  logic begin_blocked;
  assign begin_blocked = lock_q && (lock_wf_q != cmd_wf_i);
  assign cmd_ready_o   = (st == T_IDLE) && !(cmd_i == CMD_TX_BEGIN && begin_blocked);

  always_comb begin
    wf_begin        = '0;
    wf_commit       = '0;
    wf_conflict     = '0;
    wf_abort        = '0;
    vr_backup       = '0;
    vr_restore      = '0;
    vr_restore_mask = '0;
    if (accept && cmd_i == CMD_TX_BEGIN) begin
      wf_begin[cmd_wf_i]  = 1'b1;
      vr_backup[cmd_wf_i] = 1'b1;      // shadow copy in the same cycle
    end
    if (accept && cmd_i == CMD_TX_COMMIT) wf_commit[cmd_wf_i] = 1'b1;
    if (st == T_LDS_END && tx_q && conf_q != '0) begin
      wf_conflict[wf_q]     = 1'b1;
      vr_restore[wf_q]      = 1'b1;
      vr_restore_mask[wf_q] = conf_q;
    end
    if (st == T_BEGIN2 && mode_o[wf_q] == MODE_WG_SERIAL && !lock_q) begin
      for (int w = 0; w < NUM_WF; w++)
        if (FW'(w) != wf_q) wf_abort[w] = 1'b1;
    end
    if (st == T_ABORT2) begin
      for (int w = 0; w < NUM_WF; w++)
        if (FW'(w) != wf_q) begin
          vr_restore[w]      = 1'b1;
          vr_restore_mask[w] = wf_tcm[w];
        end
    end
  end

  // ------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= T_IDLE;
      cmd_q        <= CMD_TX_BEGIN;
      wf_q         <= '0;
      exec_q       <= '0;
      addr_q       <= '0;
      wdata_q      <= '0;
      tx_q         <= 1'b0;
      pending      <= '0;
      done_q       <= '0;
      conf_q       <= '0;
      rdata_q      <= '0;
      outst        <= '0;
      lane_q       <= '0;
      sel_q        <= '0;
      scan_op_q    <= BOP_RESTORE;
      restart_q    <= 1'b0;
      exec_new_q   <= '0;
      lock_q       <= 1'b0;
      lock_wf_q    <= '0;
      resp_valid_o <= 1'b0;
    end else begin
      resp_valid_o <= 1'b0;
      unique case (st)
        T_IDLE: if (accept) begin
          cmd_q     <= cmd_i;
          wf_q      <= cmd_wf_i;
          exec_q    <= cmd_exec_i;
          addr_q    <= cmd_addr_i;
          wdata_q   <= cmd_wdata_i;
          done_q    <= '0;
          conf_q    <= '0;
          restart_q <= 1'b0;
          exec_new_q <= cmd_exec_i;
          unique case (cmd_i)
            CMD_TX_BEGIN: st <= T_BEGIN2;
            CMD_TX_COMMIT: begin
              restart_q  <= wf_restart[cmd_wf_i];
              exec_new_q <= wf_restart[cmd_wf_i] ? wf_exec_new[cmd_wf_i] : cmd_exec_i;
              done_q     <= wf_commit_mask[cmd_wf_i];
              if (lock_q && lock_wf_q == cmd_wf_i && wf_in_tx[cmd_wf_i])
                lock_q <= 1'b0;                      // serialized transaction ends
              sel_q <= '0;
              sel_q[cmd_wf_i*WF_SIZE +: WF_SIZE] <= wf_commit_mask[cmd_wf_i];
              scan_op_q <= BOP_CLEAR;
              st <= (wf_commit_mask[cmd_wf_i] != '0) ? T_SCAN : T_RESP;
            end
            default: begin
              tx_q    <= wf_in_tx[cmd_wf_i];
              pending <= wf_active[cmd_wf_i];
              st      <= T_ROUND;
            end
          endcase
        end
        T_BEGIN2: begin
          if (mode_o[wf_q] == MODE_WG_SERIAL && !lock_q) begin
            lock_q    <= 1'b1;
            lock_wf_q <= wf_q;
            st        <= T_ABORT2;
          end else st <= T_RESP;
        end
        T_ABORT2: begin
          // restore every work-item of the aborted wavefronts
          for (int w = 0; w < NUM_WF; w++)
            sel_q[w*WF_SIZE +: WF_SIZE] <= (FW'(w) == wf_q) ? '0 : wf_tcm[w];
          scan_op_q <= BOP_RESTORE;
          st        <= T_SCAN;
        end
        T_ROUND: begin
          if (pending == '0) st <= T_LDS_END;
          else begin
            pending <= pending & ~issued;
            outst   <= grant;
            lane_q  <= grant_lane;
            st      <= T_WAIT;
          end
        end
        T_WAIT: begin
          for (int b = 0; b < NUM_BANKS; b++) begin
            if (b_resp[b] && outst[b]) begin
              rdata_q[lane_q[b]] <= b_rdata[b];
              if (b_res[b] == ACC_CONFLICT) conf_q[lane_q[b]] <= 1'b1;
              else                          done_q[lane_q[b]] <= 1'b1;
            end
          end
          outst <= outst & ~b_resp;
          if ((outst & ~b_resp) == '0) st <= T_ROUND;
        end
        T_LDS_END: begin
          if (tx_q && conf_q != '0) st <= T_BCAST;
          else                     st <= T_RESP;
        end
        T_BCAST: begin
          // conflict broadcast: every bank loads the wavefront's TCM
          sel_q <= '0;
          sel_q[wf_q*WF_SIZE +: WF_SIZE] <= wf_tcm[wf_q];
          scan_op_q <= BOP_RESTORE;
          st        <= T_SCAN;
        end
        T_SCAN: begin
          outst <= '1;
          st    <= T_SCANW;
        end
        T_SCANW: begin
          outst <= outst & ~b_resp;
          if ((outst & ~b_resp) == '0) st <= T_RESP;
        end
        T_RESP: begin
          resp_valid_o <= 1'b1;
          st           <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  assign resp_cmd_o      = cmd_q;
  assign resp_wf_o       = wf_q;
  assign resp_rdata_o    = rdata_q;
  assign resp_done_o     = done_q;
  assign resp_conflict_o = conf_q;
  assign resp_restart_o  = restart_q;
  assign resp_exec_new_o = exec_new_q;

endmodule
