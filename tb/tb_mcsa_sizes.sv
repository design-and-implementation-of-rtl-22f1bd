// tb_mcsa_sizes: self-check of the modified carry skip adder at the other
// word widths it is meant for, 8, 32 and 64 bits (2, 8 and 16 groups of 4).
// Each width gets all-ones/carry-through corners and NRAND random operand
// pairs with random carry-in, checked against the integer sum a + b + cin.
// It also counts, per width, vectors whose carry out is 1 and 0, and fails
// if either never occurred. A time watchdog ends a hung run.
module tb_mcsa_sizes;
  localparam int NRAND = 20000;

  logic [7:0]  a8,  b8,  s8;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;
  logic cin, c8, c32, c64;
  int checks = 0, failures = 0;
  int cout1 [3];
  int cout0 [3];

  mcsa #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .carry(c8));
  mcsa #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .carry(c32));
  mcsa #(.WIDTH(64)) dut64 (.a(a64), .b(b64), .cin(cin), .sum(s64), .carry(c64));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive the same 64-bit operands (truncated) into all three adders
  task automatic apply(input logic [63:0] ta, input logic [63:0] tb_, input logic tcin);
    logic [8:0]  e8;
    logic [32:0] e32;
    logic [64:0] e64;
    a8 = ta[7:0];   b8 = tb_[7:0];
    a32 = ta[31:0]; b32 = tb_[31:0];
    a64 = ta;       b64 = tb_;
    cin = tcin;
    #1;
    e8  = {1'b0, ta[7:0]}  + {1'b0, tb_[7:0]}  + 9'(tcin);
    e32 = {1'b0, ta[31:0]} + {1'b0, tb_[31:0]} + 33'(tcin);
    e64 = {1'b0, ta}       + {1'b0, tb_}       + 65'(tcin);
    checks += 3;
    if ({c8, s8} != e8) begin
      failures++; $display("FAIL 8-bit a=%h b=%h cin=%b -> %b %h", a8, b8, cin, c8, s8);
    end
    if ({c32, s32} != e32) begin
      failures++; $display("FAIL 32-bit a=%h b=%h cin=%b -> %b %h", a32, b32, cin, c32, s32);
    end
    if ({c64, s64} != e64) begin
      failures++; $display("FAIL 64-bit a=%h b=%h cin=%b -> %b %h", a64, b64, cin, c64, s64);
    end
    if (e8[8])   cout1[0]++; else cout0[0]++;
    if (e32[32]) cout1[1]++; else cout0[1]++;
    if (e64[64]) cout1[2]++; else cout0[2]++;
  endtask

  initial begin
    foreach (cout1[i]) begin cout1[i] = 0; cout0[i] = 0; end
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, 64'd1, 1'b0);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    for (int i = 0; i < NRAND; i++) begin
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    foreach (cout1[i]) begin
      if (cout1[i] == 0 || cout0[i] == 0) begin
        failures++;
        $display("FAIL width index %0d: carry out did not take both values", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
