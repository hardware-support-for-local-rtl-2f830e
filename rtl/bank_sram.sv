// One local memory bank: a single-port array of WORDS words of 4 bytes.
//
// The bank serves one access per clock: a write (with per-byte enables) or a
// read, whose data appears on rdata in the next cycle (synchronous read).
// rdata holds its value until the next read. Size follows the 2 KB bank of the
// baseline LDS; the single port follows the document's "only one access to
// memory per clock cycle"; the byte enables are this design's choice so that
// one-byte owner records can be written in place. Contents are not reset.
module bank_sram #(
  parameter int unsigned WORDS = 512,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,      // access this cycle
  input  logic          we,      // 1: write, 0: read
  input  logic [3:0]    be,      // byte enables for writes
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < 4; b++)
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
