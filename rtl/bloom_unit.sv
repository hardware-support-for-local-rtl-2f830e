// Bloom signatures of one LDS bank and their parallel evaluation.
//
// Every work-item of the work-group owns one BITS-bit signature in this bank
// (256 x 8 bits). An address at row r of the bank hashes to bit r % BITS.
// A query from work-item q at row r is evaluated in the same cycle against all
// signatures: another work-item's bit set -> BLOOM_CONFLICT; otherwise q's own
// bit set -> BLOOM_OWN; otherwise BLOOM_NEW. set_en records an access of
// set_wi at set_row on the next clock edge; clr_en clears, in one clock, the
// signatures of every work-item selected in clr_mask (commit / abort).
// Signatures reset to empty. Signature count, width and hash follow the
// document; holding the signatures in flip-flops next to the bank (rather than
// in vector registers) is this design's choice.
module bloom_unit
  import localtm_pkg::*;
#(
  parameter int unsigned NWI  = LTM_WG_SIZE,
  parameter int unsigned BITS = LTM_BLOOM_BITS,
  parameter int unsigned RW   = 9,
  localparam int unsigned IW  = $clog2(NWI)
) (
  input  logic           clk,
  input  logic           rst_n,
  // query (combinational)
  input  logic [IW-1:0]  q_wi,
  input  logic [RW-1:0]  q_row,
  output bloom_res_e     q_res,
  // record an access
  input  logic           set_en,
  input  logic [IW-1:0]  set_wi,
  input  logic [RW-1:0]  set_row,
  // clear signatures
  input  logic           clr_en,
  input  logic [NWI-1:0] clr_mask
);

  localparam int unsigned HW = $clog2(BITS);

  logic [BITS-1:0] sig [NWI];

  // hash: row modulo the signature width
  function automatic logic [HW-1:0] hash(input logic [RW-1:0] row);
    return HW'(row % BITS);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NWI; w++) sig[w] <= '0;
    end else begin
      for (int w = 0; w < NWI; w++) begin
        if (clr_en && clr_mask[w]) sig[w] <= '0;
        else if (set_en && set_wi == IW'(w)) sig[w][hash(set_row)] <= 1'b1;
      end
    end
  end

  logic own_hit, other_hit;
  always_comb begin
    own_hit   = sig[q_wi][hash(q_row)];
    other_hit = 1'b0;
    for (int w = 0; w < NWI; w++)
      if (IW'(w) != q_wi) other_hit |= sig[w][hash(q_row)];
    if (other_hit)    q_res = BLOOM_CONFLICT;
    else if (own_hit) q_res = BLOOM_OWN;
    else              q_res = BLOOM_NEW;
  end

endmodule
