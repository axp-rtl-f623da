// tb_axp_pe: end-to-end testbench of the processing element at its default
// configuration (single precision, 64 weight rows, 16 input rows, 16-bit words),
// four layers of 150 dot-product frames. The workload and the checks are
// described in tb_axp_pe_body.svh.
module tb_axp_pe;
  localparam int W = 32, E = 8, M = 23, AB = 16, NW = 64, NIN = 16;
  localparam int LAYERS = 4, FRAMES = 150;
  localparam string NAME = "default";

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [4:0]    cfg_abit;
  logic          am_clear, ld_en;
  logic [1:0]    ld_target;
  logic [9:0]    ld_addr;
  logic [AB-1:0] ld_data;
  logic          in_valid, in_first, in_last;
  logic [W-1:0]  in_act, in_wgt;
  logic          prod_valid, prod_hit, done;
  logic [W-1:0]  prod, acc, result;

  axp_pe dut (.*);

`include "tb_axp_pe_body.svh"

  initial begin
    fork
      wait (finished);
      begin
        repeat (400000) @(posedge clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
