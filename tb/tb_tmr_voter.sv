// tb_tmr_voter: self-checking test of the TMR voter.
//
// Drives random words into the three inputs, upsetting random bits of at
// most one copy, and checks the voted word against the unupset value and the
// per-copy fault flags; then checks that two identical upsets outvote the
// good copy, as a 2-of-3 vote must.
module tb_tmr_voter;
  localparam int W = 12;
  logic [W-1:0] in1, in2, in3, voted;
  logic mismatch;
  logic [2:0] faulty;
  tmr_voter #(.W(W)) dut (.*);
  int checks = 0, failures = 0;

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      automatic logic [W-1:0] good = W'($urandom);
      automatic logic [W-1:0] upset = (t % 4 == 0) ? '0 : W'($urandom) | W'(1);
      automatic int which = $urandom_range(0, 2);
      in1 = good; in2 = good; in3 = good;
      if (which == 0) in1 ^= upset; else if (which == 1) in2 ^= upset; else in3 ^= upset;
      #1;
      checks++;
      if (voted != good) begin failures++; $display("vote %h expected %h", voted, good); end
      checks++;
      if (mismatch != (upset != 0) || (upset != 0 && faulty != 3'(1 << which))) begin
        failures++; $display("flags wrong: mismatch %b faulty %b which %0d", mismatch, faulty, which);
      end
    end
    in1 = 12'h0F0; in2 = 12'h0F0; in3 = 12'hABC; #1;
    checks++;
    if (voted != 12'h0F0 || faulty != 3'b100) begin failures++; $display("two-of-three wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
