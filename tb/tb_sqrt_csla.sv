// tb_sqrt_csla: checks the square-root carry select adder at 16, 32 and 64
// bits (5, 7 and 10 groups) against the integer sum a + b + cin. Stimulus:
// corner cases (all zeros, all ones, carries rippling across every group
// boundary), the 16-bit operand pair 0x9A75 + 0x9BB9 shown in the adder's
// simulation, and random operands. Watchdog included.
module tb_sqrt_csla;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;
  logic        cin, co16, co32, co64;

  sqrt_csla                          dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  sqrt_csla #(.N(32), .NGROUPS(7))   dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(co32));
  sqrt_csla #(.N(64), .NGROUPS(10))  dut64 (.a(a64), .b(b64), .cin(cin), .sum(s64), .cout(co64));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] a, logic [63:0] b, logic c);
    logic [16:0] r16;
    logic [32:0] r32;
    logic [64:0] r64;
    a16 = a[15:0]; b16 = b[15:0];
    a32 = a[31:0]; b32 = b[31:0];
    a64 = a;       b64 = b;
    cin = c;
    #1;
    r16 = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(c);
    r32 = {1'b0, a[31:0]} + {1'b0, b[31:0]} + 33'(c);
    r64 = {1'b0, a} + {1'b0, b} + 65'(c);
    checks += 3;
    if ({co16, s16} !== r16) begin
      failures++;
      $display("FAIL 16: %h + %h + %b = %b %h, expected %h", a16, b16, c, co16, s16, r16);
    end
    if ({co32, s32} !== r32) begin
      failures++;
      $display("FAIL 32: %h + %h + %b = %b %h, expected %h", a32, b32, c, co32, s32, r32);
    end
    if ({co64, s64} !== r64) begin
      failures++;
      $display("FAIL 64: %h + %h + %b = %b %h, expected %h", a64, b64, c, co64, s64, r64);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    apply(64'h0000_0000_0000_9A75, 64'h0000_0000_0000_9BB9, 1'b0);
    apply(64'h0000_0000_0000_9A75, 64'h0000_0000_0000_9BB9, 1'b1);
    // A single 1 added to an all-ones prefix of every length: the carry
    // ripples up to each bit position, crossing each group boundary.
    for (int k = 0; k < 64; k++) begin
      apply((64'd1 << k) - 64'd1, 64'd1, 1'b0);
      apply((64'd1 << k) - 64'd1, 64'd0, 1'b1);
    end
    for (int i = 0; i < 20000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
