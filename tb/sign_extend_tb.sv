// sign_extend_tb: every 4-bit input extended to 8 bits must keep its signed
// value (0101 -> 00000101, 1110 -> 11111110).
module sign_extend_tb;
  logic [3:0] in;
  logic [7:0] out;
  int checks = 0, failures = 0;

  sign_extend #(.IN_W(4), .OUT_W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int i = 0; i < 16; i++) begin
      in = 4'(i); #1;
      v = (i > 7) ? i - 16 : i;
      checks++;
      if ($signed(out) != v) begin
        failures++;
        $display("in=%b out=%b exp %0d", in, out, v);
      end
    end
    in = 4'b0101; #1; checks++; if (out !== 8'b00000101) failures++;
    in = 4'b1110; #1; checks++; if (out !== 8'b11111110) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
