// tb_mcsa_fig7: replays the reference simulation of the 16-bit modified
// carry skip adder and checks its internal group signals as well as its
// ports.
//
// The reference run applies three operand pairs (FFFF+0000, 5555+AAAA,
// 3333+CCCC), each with cin = 1 and then cin = 0, and gives sum = 0000 with
// carry 1, then FFFF with carry 0. For all six vectors it shows each upper
// group's carry-in-0 ripple sum as 1111 and its excess-1 converter sum as
// 0000. For the last vector (3333+CCCC, cin 0) it also lists r1c=0, r2c=r3c=
// r4c=0, becc=becc1=becc2=1 and multiplexer carries m1c=m2c=0. Names map to
// the RTL as: r1c = gc[0], m1c = gc[1], m2c = gc[2]; group k holds
// r(k+1)sum/r(k+1)c in rsum/rc and the converter sum and carry in becres.
// A time watchdog ends a hung run.
module tb_mcsa_fig7;
  logic [15:0] a, b, sum;
  logic cin, carry;
  int checks = 0, failures = 0;

  mcsa dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string name, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %b, expected %b (a=%h b=%h cin=%b)", name, got, want, a, b, cin);
    end
  endtask

  task automatic expect_nib(string name, logic [3:0] got, logic [3:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %b, expected %b (a=%h b=%h cin=%b)", name, got, want, a, b, cin);
    end
  endtask

  task automatic run(logic [15:0] ta, logic [15:0] tb_, logic tcin);
    a = ta; b = tb_; cin = tcin;
    #1;
    checks++;
    if (sum !== (tcin ? 16'h0000 : 16'hFFFF) || carry !== tcin) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> carry=%b sum=%h", a, b, cin, carry, sum);
    end
    expect_nib("r2sum",   dut.g_group[1].rsum,        4'b1111);
    expect_nib("becsum",  dut.g_group[1].becres[3:0], 4'b0000);
    expect_nib("r3sum",   dut.g_group[2].rsum,        4'b1111);
    expect_nib("becsum1", dut.g_group[2].becres[3:0], 4'b0000);
    expect_nib("r4sum",   dut.g_group[3].rsum,        4'b1111);
    expect_nib("becsum2", dut.g_group[3].becres[3:0], 4'b0000);
  endtask

  initial begin
    run(16'hFFFF, 16'h0000, 1'b1);
    run(16'hFFFF, 16'h0000, 1'b0);
    run(16'h5555, 16'hAAAA, 1'b1);
    run(16'h5555, 16'hAAAA, 1'b0);
    run(16'h3333, 16'hCCCC, 1'b1);
    run(16'h3333, 16'hCCCC, 1'b0);
    // single-bit values listed for the last vector
    expect_bit("r1c",   dut.gc[0],               1'b0);
    expect_bit("r2c",   dut.g_group[1].rc,       1'b0);
    expect_bit("becc",  dut.g_group[1].becres[4], 1'b1);
    expect_bit("r3c",   dut.g_group[2].rc,       1'b0);
    expect_bit("becc1", dut.g_group[2].becres[4], 1'b1);
    expect_bit("r4c",   dut.g_group[3].rc,       1'b0);
    expect_bit("becc2", dut.g_group[3].becres[4], 1'b1);
    expect_bit("m1c",   dut.gc[1],               1'b0);
    expect_bit("m2c",   dut.gc[2],               1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
