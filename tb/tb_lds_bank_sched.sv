// Self-checking test of lds_bank_sched: random pending masks and addresses
// for a 64-lane wavefront and 32 banks. For every bank the expected grant is
// the lowest pending lane whose address has that bank (address % 32); the
// test also drains whole instructions round by round and checks the number
// of rounds equals the largest number of lanes sharing one bank.
module tb_lds_bank_sched;
  localparam int LANES = 64, NB = 32, AW = 14;
  logic [LANES-1:0] pending_i;
  logic [LANES-1:0][AW-1:0] addr_i;
  logic [NB-1:0] grant_o;
  logic [NB-1:0][5:0] lane_o;
  logic [LANES-1:0] issued_o;
  int checks = 0, failures = 0;

  lds_bank_sched #(.LANES(LANES), .NBANKS(NB), .AW(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_round;
    logic [LANES-1:0] exp_issued;
    exp_issued = '0;
    #1;
    for (int b = 0; b < NB; b++) begin
      int lowest;
      lowest = -1;
      for (int l = 0; l < LANES; l++)
        if (lowest < 0 && pending_i[l] && (addr_i[l] % NB) == b) lowest = l;
      checks++;
      if ((lowest >= 0) !== grant_o[b] || (lowest >= 0 && lane_o[b] != 6'(lowest))) begin
        failures++;
        $display("FAIL bank %0d grant %b lane %0d exp %0d", b, grant_o[b], lane_o[b], lowest);
      end
      if (lowest >= 0) exp_issued[lowest] = 1'b1;
    end
    checks++;
    if (issued_o !== exp_issued) begin failures++; $display("FAIL issued"); end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      int stride, maxc, rounds;
      int cnt [NB];
      stride = (it % 3 == 0) ? 1 : (it % 3 == 1) ? 2 : $urandom_range(0, 40);
      maxc = 0; rounds = 0;
      for (int b = 0; b < NB; b++) cnt[b] = 0;
      for (int l = 0; l < LANES; l++) begin
        addr_i[l]    = AW'((it * 7 + l * stride) % (1 << AW));
        if (it % 5 == 4) addr_i[l] = AW'($urandom);
        pending_i[l] = ($urandom_range(0, 7) != 0);
        if (pending_i[l]) cnt[addr_i[l] % NB]++;
      end
      for (int b = 0; b < NB; b++) if (cnt[b] > maxc) maxc = cnt[b];
      while (pending_i != '0 && rounds < 100) begin
        check_round();
        pending_i = pending_i & ~issued_o;
        rounds++;
      end
      checks++;
      if (rounds != maxc) begin failures++; $display("FAIL rounds %0d exp %0d", rounds, maxc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
