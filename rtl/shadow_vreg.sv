// Vector registers of one wavefront built in pairs for transactional rollback.
//
// Each of the NREGS vector registers (LANES lanes of 32 bits) has a shadow
// twin. backup_i copies every register into its twin in one clock (done at
// TX.Begin). restore_i copies the twin back into the register for the lanes
// set in restore_mask_i (work-items that conflicted). The normal write port
// writes register wr_reg_i in the lanes of wr_mask_i; the read port is
// combinational. Restore has priority over a write in the same cycle. Working
// registers reset to zero. Register pairs with a one-cycle copy follow the
// document; the number of registers per wavefront is this design's choice.
module shadow_vreg #(
  parameter int unsigned NREGS = 4,
  parameter int unsigned LANES = 64,
  localparam int unsigned RI   = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en_i,
  input  logic [RI-1:0]          wr_reg_i,
  input  logic [LANES-1:0]       wr_mask_i,
  input  logic [LANES-1:0][31:0] wr_data_i,
  input  logic [RI-1:0]          rd_reg_i,
  output logic [LANES-1:0][31:0] rd_data_o,
  input  logic                   backup_i,
  input  logic                   restore_i,
  input  logic [LANES-1:0]       restore_mask_i
);

  logic [LANES-1:0][31:0] regs [NREGS];
  logic [LANES-1:0][31:0] shadow [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) begin
        regs[r]   <= '0;
        shadow[r] <= '0;
      end
    end else begin
      for (int r = 0; r < NREGS; r++) begin
        if (backup_i) shadow[r] <= regs[r];
        for (int l = 0; l < LANES; l++) begin
          if (restore_i && restore_mask_i[l])
            regs[r][l] <= shadow[r][l];
          else if (wr_en_i && wr_reg_i == RI'(r) && wr_mask_i[l])
            regs[r][l] <= wr_data_i[l];
        end
      end
    end
  end

  assign rd_data_o = regs[rd_reg_i];

endmodule
