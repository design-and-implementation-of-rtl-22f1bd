// tb_rca: exhaustive self-check of the 4-bit ripple carry adder.
// Applies all 512 combinations of a, b and cin and compares {cout, sum}
// with the integer sum a + b + cin. A time watchdog ends a hung run.
module tb_rca;
  localparam int W = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {a, b, cin} = (2*W+1)'(v);
      #1;
      checks++;
      if ({cout, sum} != (W+1)'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> cout=%b sum=%h", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
