// Per-round bank arbitration of one wavefront LDS instruction.
//
// The LDS lets each bank serve one work-item at a time: coalesced accesses
// (all lanes in different banks) go in one round, accesses that collide in a
// bank are serialized over several rounds. Given the lanes still pending and
// each lane's word address (bank = address % NBANKS), this combinational block
// picks for every bank the lowest-numbered pending lane mapped to it.
// grant_o[b] says bank b has a lane this round, lane_o[b] is that lane, and
// issued_o is the set of lanes granted (to be removed from pending). Choosing
// the lowest lane is this design's choice; the document only says that
// uncoalesced accesses are serialized.
module lds_bank_sched #(
  parameter int unsigned LANES  = 64,
  parameter int unsigned NBANKS = 32,
  parameter int unsigned AW     = 14,
  localparam int unsigned LW    = $clog2(LANES),
  localparam int unsigned BW    = $clog2(NBANKS)
) (
  input  logic [LANES-1:0]         pending_i,
  input  logic [LANES-1:0][AW-1:0] addr_i,
  output logic [NBANKS-1:0]        grant_o,
  output logic [NBANKS-1:0][LW-1:0] lane_o,
  output logic [LANES-1:0]         issued_o
);

  always_comb begin
    grant_o  = '0;
    lane_o   = '0;
    issued_o = '0;
    for (int b = 0; b < NBANKS; b++) begin
      for (int l = LANES - 1; l >= 0; l--) begin
        if (pending_i[l] && addr_i[l][BW-1:0] == BW'(b)) begin
          grant_o[b] = 1'b1;
          lane_o[b]  = LW'(l);
        end
      end
      if (grant_o[b]) issued_o[lane_o[b]] = 1'b1;
    end
  end

endmodule
