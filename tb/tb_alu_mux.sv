// tb_alu_mux: drives each of the twelve result inputs with its own random
// value and checks that every opcode selects the right one and that the four
// free opcodes give zero. Watchdog included.
module tb_alu_mux;
  import csla_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [15:0] r [12];
  logic [15:0] z, expected;
  alu_op_e sel;

  alu_mux dut (.sel(sel), .sum_i(r[0]), .mul_i(r[1]), .sub_i(r[2]), .and_i(r[3]),
               .or_i(r[4]), .nand_i(r[5]), .nor_i(r[6]), .xor_i(r[7]), .inc_i(r[8]),
               .dec_i(r[9]), .not_i(r[10]), .twos_i(r[11]), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 12; k++) r[k] = 16'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = alu_op_e'(s);
        #1;
        // Opcodes 1..12 select r[opcode-1]; 0, 13, 14, 15 select zero.
        expected = (s >= 1 && s <= 12) ? r[s-1] : 16'h0000;
        checks++;
        if (z !== expected) begin
          failures++;
          $display("FAIL sel=%b z=%h expected %h", sel, z, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
