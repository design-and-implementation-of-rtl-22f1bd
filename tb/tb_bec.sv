// tb_bec: exhaustive self-check of the 5-bit binary to excess-1 converter.
// Every input value 0..31 must come out incremented by one, 31 wrapping to
// 0. A time watchdog ends a hung run.
module tb_bec;
  localparam int W = 5;
  logic [W-1:0] b, x;
  int checks = 0, failures = 0;

  bec #(.WIDTH(W)) dut (.b(b), .x(x));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      b = W'(v);
      #1;
      checks++;
      if (x != W'((v + 1) % (1 << W))) begin
        failures++;
        $display("FAIL b=%b -> x=%b", b, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
