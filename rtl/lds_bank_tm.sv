// One LDS bank with transactional version management and conflict detection.
//
// The bank array holds, for a work-group that declared N words of variables in
// this bank, the variables at rows 0..N-1, their backup copies at rows
// N..2N-1 (backup of row k at row k+N) and one owner byte per variable after
// that (owner of row k in byte k of the owner area, i.e. word 2N + k/4, byte
// lane k%4). A valid bit per row, kept in flip-flops, marks the shadow entries
// in use. The 256 per-work-item Bloom signatures of the bank sit in bloom_unit.
//
// A transactional access (req_tx=1, row < N) goes through:
//   1. fast detection: the Bloom query (one cycle). Another work-item's
//      signature positive -> ACC_CONFLICT, the access is not performed.
//      No signature positive -> new access.
//   2. ownership detection (own signature positive only): the owner byte is
//      read; same owner -> ACC_OWN, plain access; otherwise (or no valid
//      entry) -> ACC_FALSE_OWN, handled as a new access.
//   New accesses read the old value, write it to the backup row, write the
//   owner byte, set the valid bit and the Bloom bit, then perform the access.
// Restoring and clearing of the conflicted work-items' entries (stage 3,
// conflict broadcast) and clearing at commit are separate operations
// (BOP_RESTORE, BOP_CLEAR) that scan the owner area word by word, skip words
// with no valid entry, and for each entry owned by a work-item selected in
// req_sel either copy the backup back (restore) or only drop it (clear). Both
// also clear the selected work-items' Bloom signatures.
//
// Interface: req_valid/req_ready handshake (ready only when idle); req_sel
// must stay stable until resp_valid. resp_valid pulses for one cycle with the
// read data, the outcome and, for scans, the number of entries handled.
// Timing (one memory operation per cycle, as the document assumes), counted
// as clock edges after the accepting edge until resp_valid is high: plain
// write 1, plain read 2; conflict 1 (the Bloom evaluation); owner hit write 2,
// read 3 (one cycle for the owner check); new access read 3, write 4 (the
// backup write and the owner write add 2); a false owner hit on a valid entry
// adds the owner check to a new access. A scan takes 1 cycle per owner word
// with no valid entry, 2 per word otherwise (clear) or 3 plus 2 per restored
// entry (restore), plus 1. Folding the local restore of
// stage 1 into the broadcast restore, the valid bits, and accesses at rows
// >= N being non-transactional are this design's choices.
module lds_bank_tm
  import localtm_pkg::*;
#(
  parameter int unsigned WORDS = LTM_BANK_WORDS,
  parameter int unsigned NWI   = LTM_WG_SIZE,
  parameter int unsigned BITS  = LTM_BLOOM_BITS,
  localparam int unsigned RW   = $clog2(WORDS),
  localparam int unsigned IW   = $clog2(NWI)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [RW-1:0]  n_vars,     // N: variable words of this bank
  // request
  input  logic           req_valid,
  output logic           req_ready,
  input  bank_op_e       req_op,
  input  logic           req_tx,     // access is transactional
  input  logic           req_we,
  input  logic [IW-1:0]  req_wi,     // work-item id within the work-group
  input  logic [RW-1:0]  req_row,
  input  logic [31:0]    req_wdata,
  input  logic [NWI-1:0] req_sel,    // work-items selected by a scan
  // response
  output logic           resp_valid,
  output logic [31:0]    resp_rdata,
  output acc_res_e       resp_res,
  output logic [RW-1:0]  resp_entries
);

  typedef enum logic [3:0] {
    S_IDLE, S_PLAIN, S_RDCAP, S_EVAL, S_OWNCHK, S_BKP, S_OWNW, S_WRD,
    S_SCWORD, S_SCCHK, S_SCLANE, S_SCRST
  } state_e;

  state_e        state;
  bank_op_e      op_q;
  logic          we_q;
  logic [IW-1:0] wi_q;
  logic [RW-1:0] row_q;
  logic [31:0]   wdata_q;
  logic [WORDS-1:0] vld;
  logic [RW-3:0] idx;          // owner word index of a scan
  logic [3:0]    match_q;
  logic [RW-1:0] k_q;

  // memory port
  logic          m_en, m_we;
  logic [3:0]    m_be;
  logic [RW-1:0] m_addr;
  logic [31:0]   m_wdata, m_rdata;

  bank_sram #(.WORDS(WORDS)) u_mem (
    .clk, .en(m_en), .we(m_we), .be(m_be), .addr(m_addr),
    .wdata(m_wdata), .rdata(m_rdata)
  );

  // Bloom signatures
  bloom_res_e    b_res;
  logic          b_set, b_clr;

  bloom_unit #(.NWI(NWI), .BITS(BITS), .RW(RW)) u_bloom (
    .clk, .rst_n,
    .q_wi(wi_q), .q_row(row_q), .q_res(b_res),
    .set_en(b_set), .set_wi(wi_q), .set_row(row_q),
    .clr_en(b_clr), .clr_mask(req_sel)
  );

  // shadow layout
  logic [RW-1:0] bkp_row, own_word, scan_words, scan_base;
  logic [1:0]    own_lane;
  logic [7:0]    own_byte;
  logic [3:0]    scan_vld, scan_match;

  always_comb begin
    bkp_row    = row_q + n_vars;
    own_word   = (n_vars << 1) + (row_q >> 2);
    own_lane   = row_q[1:0];
    own_byte   = m_rdata[8*own_lane +: 8];
    scan_words = (n_vars + RW'(3)) >> 2;
    scan_base  = {idx, 2'b00};
    scan_vld   = vld[scan_base +: 4];
    for (int j = 0; j < 4; j++)
      scan_match[j] = scan_vld[j] && (scan_base + RW'(j) < n_vars) &&
                      req_sel[m_rdata[8*j +: IW]];
  end

  assign req_ready = (state == S_IDLE);

  // memory and Bloom control per state
  always_comb begin
    m_en = 1'b0; m_we = 1'b0; m_be = 4'hf; m_addr = row_q; m_wdata = wdata_q;
    b_set = 1'b0;
    b_clr = 1'b0;
    unique case (state)
      S_IDLE:   b_clr = req_valid && (req_op != BOP_ACCESS);
      S_PLAIN:  begin m_en = 1'b1; m_we = we_q; end
      S_EVAL: begin
        if (b_res == BLOOM_NEW) m_en = 1'b1;                          // read old value
        else if (b_res == BLOOM_OWN && vld[row_q]) begin m_en = 1'b1; m_addr = own_word; end
        else if (b_res == BLOOM_OWN) m_en = 1'b1;                     // no entry: new
      end
      S_OWNCHK: begin
        m_en = 1'b1;
        if (own_byte == 8'(wi_q)) m_we = we_q;                        // owner hit: access
      end
      S_BKP:    begin m_en = 1'b1; m_we = 1'b1; m_addr = bkp_row; m_wdata = m_rdata; end
      S_OWNW: begin
        m_en = 1'b1; m_we = 1'b1; m_addr = own_word;
        m_be = 4'b0001 << own_lane; m_wdata = {4{8'(wi_q)}};
        b_set = 1'b1;
      end
      S_WRD:    begin m_en = 1'b1; m_we = 1'b1; end
      S_SCWORD: begin
        m_addr = (n_vars << 1) + RW'(idx);
        m_en   = (RW'(idx) < scan_words) && (scan_vld != 4'b0);
      end
      S_SCCHK:  ;
      S_SCLANE: begin
        for (int j = 3; j >= 0; j--)
          if (match_q[j]) m_addr = scan_base + RW'(j) + n_vars;
        m_en = (match_q != 4'b0);
      end
      S_SCRST:  begin m_en = 1'b1; m_we = 1'b1; m_addr = k_q; m_wdata = m_rdata; end
      default:  ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      op_q         <= BOP_ACCESS;
      we_q         <= 1'b0;
      wi_q         <= '0;
      row_q        <= '0;
      wdata_q      <= '0;
      vld          <= '0;
      idx          <= '0;
      match_q      <= '0;
      k_q          <= '0;
      resp_valid   <= 1'b0;
      resp_rdata   <= '0;
      resp_res     <= ACC_PLAIN;
      resp_entries <= '0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          op_q    <= req_op;
          we_q    <= req_we;
          wi_q    <= req_wi;
          row_q   <= req_row;
          wdata_q <= req_wdata;
          idx     <= '0;
          resp_entries <= '0;
          if (req_op != BOP_ACCESS) state <= S_SCWORD;
          else if (req_tx && req_row < n_vars) state <= S_EVAL;
          else begin state <= S_PLAIN; resp_res <= ACC_PLAIN; end
        end
        S_PLAIN: begin
          if (we_q) begin resp_valid <= 1'b1; state <= S_IDLE; end
          else state <= S_RDCAP;
        end
        S_RDCAP: begin
          resp_rdata <= m_rdata;
          resp_valid <= 1'b1;
          state      <= S_IDLE;
        end
        S_EVAL: begin
          unique case (b_res)
            BLOOM_CONFLICT: begin
              resp_res <= ACC_CONFLICT; resp_valid <= 1'b1; state <= S_IDLE;
            end
            BLOOM_OWN: begin
              if (vld[row_q]) state <= S_OWNCHK;
              else begin resp_res <= ACC_FALSE_OWN; state <= S_BKP; end
            end
            default: begin resp_res <= ACC_NEW; state <= S_BKP; end
          endcase
        end
        S_OWNCHK: begin
          if (own_byte == 8'(wi_q)) begin
            resp_res <= ACC_OWN;
            if (we_q) begin resp_valid <= 1'b1; state <= S_IDLE; end
            else state <= S_RDCAP;
          end else begin
            resp_res <= ACC_FALSE_OWN;
            state    <= S_BKP;       // old value is being read this cycle
          end
        end
        S_BKP: begin
          resp_rdata <= m_rdata;       // old value = read result
          state      <= S_OWNW;
        end
        S_OWNW: begin
          vld[row_q] <= 1'b1;
          if (we_q) state <= S_WRD;
          else begin resp_valid <= 1'b1; state <= S_IDLE; end
        end
        S_WRD: begin
          resp_valid <= 1'b1;
          state      <= S_IDLE;
        end
        S_SCWORD: begin
          if (RW'(idx) >= scan_words) begin
            resp_valid <= 1'b1;
            state      <= S_IDLE;
          end else if (scan_vld == 4'b0) idx <= idx + 1'b1;
          else state <= S_SCCHK;
        end
        S_SCCHK: begin
          if (op_q == BOP_CLEAR) begin
            for (int j = 0; j < 4; j++)
              if (scan_match[j]) vld[scan_base + RW'(j)] <= 1'b0;
            resp_entries <= resp_entries + RW'($countones(scan_match));
            idx   <= idx + 1'b1;
            state <= S_SCWORD;
          end else begin
            match_q <= scan_match;
            state   <= S_SCLANE;
          end
        end
        S_SCLANE: begin
          if (match_q == 4'b0) begin
            idx   <= idx + 1'b1;
            state <= S_SCWORD;
          end else begin
            for (int j = 3; j >= 0; j--)
              if (match_q[j]) k_q <= scan_base + RW'(j);
            match_q <= match_q & (match_q - 4'd1);   // drop lowest set bit
            state   <= S_SCRST;
          end
        end
        S_SCRST: begin
          vld[k_q]     <= 1'b0;
          resp_entries <= resp_entries + 1'b1;
          state        <= S_SCLANE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
