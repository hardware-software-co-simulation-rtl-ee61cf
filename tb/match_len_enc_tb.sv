// Exhaustive test of match_len_enc for Q=16: every pattern of the fifteen
// comparator outputs against a count of leading matches.
module match_len_enc_tb;
  logic [14:0] eq; logic en; logic [3:0] match_length; logic length_valid;
  int checks = 0, failures = 0;

  match_len_enc #(.Q(16)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < 32768; p++) begin
      int exp;
      eq = 15'(p); en = p[0] ^ p[3];
      exp = 0;
      while (exp < 15 && p[exp]) exp++;
      #1;
      checks++;
      if (int'(match_length) != exp || length_valid != en) begin
        failures++; $display("eq=%b len=%0d exp=%0d", eq, match_length, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
