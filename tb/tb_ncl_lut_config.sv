// tb_ncl_lut_config: checks the full adder's configuration memory.
// After reset it must hold the fault-free LUTs (G1, G2 = TH23: Set E8,
// Reset FE, repeated because the fourth input is unused; G3, G4 = TH34w2:
// Set EAA8, Reset FFFE; Hold C8 everywhere). A flip pulse must invert
// exactly the addressed cell and nothing else, a second flip must undo it,
// an idle cycle must change nothing, and reset must restore everything.
module tb_ncl_lut_config;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic seu_flip;
  logic [1:0] seu_gate;
  lut_sel_e seu_lut;
  logic [3:0] seu_bit;
  th_cfg_t [3:0] cfg;
  int checks = 0, failures = 0;

  ncl_lut_config dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  th_cfg_t [3:0] golden, expect_cfg;

  initial begin
    golden[0] = '{set_lut: 16'hE8E8, reset_lut: 16'hFEFE, hold_lut: 8'hC8};
    golden[1] = golden[0];
    golden[2] = '{set_lut: 16'hEAA8, reset_lut: 16'hFFFE, hold_lut: 8'hC8};
    golden[3] = golden[2];
    seu_flip = 1'b0; seu_gate = '0; seu_lut = LUT_SET; seu_bit = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk); #1;
    check(cfg == golden, "reset loads fault-free LUT contents");
    rst = 1'b0;
    expect_cfg = golden;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      seu_gate = 2'($urandom);
      seu_lut  = lut_sel_e'($urandom_range(2, 0));
      seu_bit  = 4'($urandom);
      seu_flip = ($urandom_range(3, 0) != 0);
      if (seu_flip) begin
        case (seu_lut)
          LUT_SET:   expect_cfg[seu_gate].set_lut   ^= 16'(1) << seu_bit;
          LUT_RESET: expect_cfg[seu_gate].reset_lut ^= 16'(1) << seu_bit;
          default:   expect_cfg[seu_gate].hold_lut  ^= 8'(1) << seu_bit[2:0];
        endcase
      end
      @(posedge clk); #1;
      check(cfg == expect_cfg, $sformatf("after flip=%0b gate %0d lut %0d bit %0d",
                                         seu_flip, seu_gate, seu_lut, seu_bit));
    end
    @(negedge clk); seu_flip = 1'b0; rst = 1'b1;
    @(posedge clk); #1;
    check(cfg == golden, "reconfiguration restores every cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
