// Self-checking test of bank_sram: random reads and byte-masked writes over
// the full 512-word bank against a reference array; checks the one-cycle
// read latency and that rdata holds between reads.
module tb_bank_sram;
  localparam int WORDS = 512;
  logic clk = 0, en = 0, we = 0;
  logic [3:0] be = '0;
  logic [8:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  bank_sram #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d, input logic [3:0] b);
    en = 1; we = 1; addr = 9'(a); wdata = d; be = b;
    @(posedge clk); #1 en = 0; we = 0;
    for (int i = 0; i < 4; i++) if (b[i]) ref_mem[a][8*i +: 8] = d[8*i +: 8];
  endtask

  task automatic rd_check(input int a);
    en = 1; we = 0; addr = 9'(a);
    @(posedge clk); #1 en = 0;
    checks++;
    if (rdata !== ref_mem[a]) begin
      failures++;
      $display("FAIL read %0d got %h exp %h", a, rdata, ref_mem[a]);
    end
    @(posedge clk); #1;           // no access: data must hold
    checks++;
    if (rdata !== ref_mem[a]) begin failures++; $display("FAIL hold %0d", a); end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < WORDS; a++) wr(a, 32'(a * 32'h01010101 + 7), 4'hf);
    for (int it = 0; it < 4000; it++) begin
      if ($urandom_range(0, 1) == 0) wr($urandom_range(0, WORDS-1), $urandom, 4'($urandom_range(0, 15)));
      else rd_check($urandom_range(0, WORDS-1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
