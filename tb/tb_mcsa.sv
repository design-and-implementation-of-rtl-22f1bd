// tb_mcsa: end-to-end self-check of the 16-bit modified carry skip adder at
// its default parameters (no parameter override).
//
// Stimulus, in order:
//   1. the operand/carry-in pairs of the design's reference simulation, with
//      the sums and carries printed there as expected values;
//   2. directed corners: zero, all ones, carries that ripple through every
//      group, and a carry generated in each group alone;
//   3. NRAND random operand pairs with a random carry-in.
// Every vector checks {carry, sum} against the integer sum a + b + cin. The
// carry into each upper group (the multiplexer select) is worked out from
// the operands to count which multiplexer input was used. Only the ports are
// observed; tb_mcsa_fig7 checks the internal group signals.
//
// Mechanisms counted (each must occur at least once, else a failure):
// multiplexer picks the ripple result (group carry-in 0) and the converter
// result (carry-in 1) in every upper group; the converter creating the
// group carry (0_1111 turned into 1_0000); carry out 0 and 1; a carry
// rippling from cin through all groups. A time watchdog ends a hung run.
module tb_mcsa;
  localparam int W  = 16;
  localparam int GW = 4;
  localparam int NG = W / GW;
  localparam int NRAND = 200000;

  logic [W-1:0] a, b, sum;
  logic cin, carry;
  int checks = 0, failures = 0;

  int sel_rca [NG];
  int sel_bec [NG];
  int bec_carry, cout0, cout1, full_ripple;

  mcsa dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one vector and check the outputs and the internal group results
  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                       input logic tcin);
    logic [W:0] exp;
    logic [GW:0] g0;
    logic cin_k;
    a = ta; b = tb_; cin = tcin;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tcin);
    checks++;
    if ({carry, sum} != exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> carry=%b sum=%h, expected %b %h",
               ta, tb_, tcin, carry, sum, exp[W], exp[W-1:0]);
    end
    if (exp[W]) cout1++; else cout0++;
    if (tcin && exp[W] && (ta ^ tb_) == '1) full_ripple++;
    for (int k = 1; k < NG; k++) begin
      // group result for carry-in 0, and the true carry into the group
      g0 = {1'b0, ta[k*GW +: GW]} + {1'b0, tb_[k*GW +: GW]};
      cin_k = ((({1'b0, ta} & ((W+1)'(1) << (k*GW)) - 1) +
               ({1'b0, tb_} & ((W+1)'(1) << (k*GW)) - 1) +
               (W+1)'(tcin)) >> (k*GW)) != 0;
      if (cin_k) sel_bec[k]++; else sel_rca[k]++;
      if (g0 == 5'b0_1111) bec_carry++;
    end
  endtask

  // A vector of the reference simulation with its printed result
  task automatic apply_ref(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                           input logic tcin, input logic [W-1:0] psum,
                           input logic pcarry);
    apply(ta, tb_, tcin);
    checks++;
    if (sum !== psum || carry !== pcarry) begin
      failures++;
      $display("FAIL reference vector a=%h b=%h cin=%b -> %b %h, printed %b %h",
               ta, tb_, tcin, carry, sum, pcarry, psum);
    end
  endtask

  initial begin
    foreach (sel_rca[k]) begin sel_rca[k] = 0; sel_bec[k] = 0; end
    bec_carry = 0; cout0 = 0; cout1 = 0; full_ripple = 0;

    // 1. reference simulation vectors
    apply_ref(16'hFFFF, 16'h0000, 1'b1, 16'h0000, 1'b1);
    apply_ref(16'hFFFF, 16'h0000, 1'b0, 16'hFFFF, 1'b0);
    apply_ref(16'h5555, 16'hAAAA, 1'b1, 16'h0000, 1'b1);
    apply_ref(16'h5555, 16'hAAAA, 1'b0, 16'hFFFF, 1'b0);
    apply_ref(16'h3333, 16'hCCCC, 1'b1, 16'h0000, 1'b1);
    apply_ref(16'h3333, 16'hCCCC, 1'b0, 16'hFFFF, 1'b0);
    apply_ref(16'hB6C9, 16'h7776, 1'b1, 16'h2E40, 1'b1);

    // 2. directed corners
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, 16'h0001, 1'b0);
    for (int k = 0; k < NG; k++) begin
      apply(W'(4'hF) << (k*GW), W'(4'h1) << (k*GW), 1'b0);  // generate in group k
      apply(W'(4'hF) << (k*GW), '0, 1'b1);                  // propagate into group k
    end

    // 3. random vectors
    for (int i = 0; i < NRAND; i++) begin
      apply(W'($urandom), W'($urandom), 1'($urandom));
    end

    for (int k = 1; k < NG; k++) begin
      $display("group %0d: mux chose ripple result %0d times, converter result %0d times",
               k, sel_rca[k], sel_bec[k]);
      if (sel_rca[k] == 0 || sel_bec[k] == 0) begin
        failures++;
        $display("FAIL group %0d: a multiplexer input was never selected", k);
      end
    end
    $display("converter-made carry %0d, carry out 0/1 %0d/%0d, full ripple %0d",
             bec_carry, cout0, cout1, full_ripple);
    if (bec_carry == 0 || cout0 == 0 || cout1 == 0 || full_ripple == 0) begin
      failures++;
      $display("FAIL a counted mechanism never occurred");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
