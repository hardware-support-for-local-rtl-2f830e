// Self-checking test of bloom_unit with the full 256 signatures of 8 bits.
// A directed part checks the hash (row % 8: the word at row 1 and row 9 share
// bit 1) and the three outcomes; a random part sets and clears signatures and
// compares every query with a reference copy of the signatures kept here.
module tb_bloom_unit;
  import localtm_pkg::*;

  localparam int NWI = 256, BITS = 8, RW = 9;
  logic clk = 0, rst_n = 0;
  logic [7:0] q_wi = '0, set_wi = '0;
  logic [RW-1:0] q_row = '0, set_row = '0;
  bloom_res_e q_res;
  logic set_en = 0, clr_en = 0;
  logic [NWI-1:0] clr_mask = '0;
  int checks = 0, failures = 0;
  logic [BITS-1:0] ref_sig [NWI];

  bloom_unit #(.NWI(NWI), .BITS(BITS), .RW(RW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bloom_res_e ref_query(input int wi, input int row);
    logic other;
    other = 0;
    for (int w = 0; w < NWI; w++) if (w != wi && ref_sig[w][row % BITS]) other = 1;
    if (other) return BLOOM_CONFLICT;
    if (ref_sig[wi][row % BITS]) return BLOOM_OWN;
    return BLOOM_NEW;
  endfunction

  task automatic query(input int wi, input int row, input bloom_res_e exp);
    q_wi = 8'(wi); q_row = RW'(row); #1;
    checks++;
    if (q_res !== exp) begin
      failures++;
      $display("FAIL query wi=%0d row=%0d got %s exp %s", wi, row, q_res.name(), exp.name());
    end
  endtask

  task automatic do_set(input int wi, input int row);
    set_en = 1; set_wi = 8'(wi); set_row = RW'(row);
    @(posedge clk); #1 set_en = 0;
    ref_sig[wi][row % BITS] = 1'b1;
  endtask

  initial begin
    for (int w = 0; w < NWI; w++) ref_sig[w] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // directed
    query(3, 1, BLOOM_NEW);
    do_set(3, 1);                 // work-item 3 touches address 35: bank 3, row 1
    query(3, 1, BLOOM_OWN);
    query(3, 9, BLOOM_OWN);       // same hash bit
    query(5, 9, BLOOM_CONFLICT);  // false positive through the hash
    query(5, 2, BLOOM_NEW);
    clr_mask = '0; clr_mask[3] = 1; clr_en = 1;
    @(posedge clk); #1 clr_en = 0; ref_sig[3] = '0;
    query(5, 9, BLOOM_NEW);
    // random
    for (int it = 0; it < 3000; it++) begin
      int unsigned r;
      r = $urandom_range(0, 99);
      if (r < 45) do_set($urandom_range(0, NWI-1), $urandom_range(0, 511));
      else if (r < 50) begin
        for (int w = 0; w < NWI; w++) clr_mask[w] = ($urandom_range(0, 3) == 0);
        clr_en = 1; @(posedge clk); #1 clr_en = 0;
        for (int w = 0; w < NWI; w++) if (clr_mask[w]) ref_sig[w] = '0;
      end else begin
        int wi, row;
        wi = $urandom_range(0, NWI-1); row = $urandom_range(0, 511);
        query(wi, row, ref_query(wi, row));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
