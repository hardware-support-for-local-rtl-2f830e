// Self-checking test of shadow_vreg (4 registers x 64 lanes): random lane
// writes, one-cycle backups and per-lane restores compared with a reference
// model of registers and shadow copies kept in the test.
module tb_shadow_vreg;
  localparam int NREGS = 4, LANES = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en_i = 0, backup_i = 0, restore_i = 0;
  logic [1:0] wr_reg_i = '0, rd_reg_i = '0;
  logic [LANES-1:0] wr_mask_i = '0, restore_mask_i = '0;
  logic [LANES-1:0][31:0] wr_data_i = '0, rd_data_o;
  logic [LANES-1:0][31:0] ref_r [NREGS], ref_s [NREGS];
  int checks = 0, failures = 0;

  shadow_vreg #(.NREGS(NREGS), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NREGS; r++) begin ref_r[r] = '0; ref_s[r] = '0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int unsigned k;
      k = $urandom_range(0, 9);
      wr_en_i = (k < 6); backup_i = (k == 6); restore_i = (k >= 7);
      if (k == 9) begin wr_en_i = 1; end   // restore and write together
      wr_reg_i = 2'($urandom_range(0, NREGS-1));
      for (int l = 0; l < LANES; l++) begin
        wr_mask_i[l] = $urandom_range(0, 1);
        restore_mask_i[l] = $urandom_range(0, 1);
        wr_data_i[l] = $urandom;
      end
      @(posedge clk); #1;
      for (int r = 0; r < NREGS; r++) begin
        logic [LANES-1:0][31:0] old_r;
        old_r = ref_r[r];
        for (int l = 0; l < LANES; l++)
          if (restore_i && restore_mask_i[l]) ref_r[r][l] = ref_s[r][l];
          else if (wr_en_i && wr_reg_i == 2'(r) && wr_mask_i[l]) ref_r[r][l] = wr_data_i[l];
        if (backup_i) ref_s[r] = old_r;
      end
      wr_en_i = 0; backup_i = 0; restore_i = 0;
      for (int r = 0; r < NREGS; r++) begin
        rd_reg_i = 2'(r); #1;
        checks++;
        if (rd_data_o !== ref_r[r]) begin failures++; $display("FAIL reg %0d it %0d", r, it); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
