// tb_mux10to5: self-check of the 10:5 carry-select multiplexer.
// Walks all pairs of 5-bit inputs with both select values and checks that
// sel=0 passes d0 and sel=1 passes d1. A time watchdog ends a hung run.
module tb_mux10to5;
  localparam int W = 5;
  logic [W-1:0] d0, d1, y;
  logic sel;
  int checks = 0, failures = 0;

  mux10to5 #(.WIDTH(W)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {sel, d1, d0} = (2*W+1)'(v);
      #1;
      checks++;
      if (y != (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b -> y=%b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
