// tb_pe_workload: one processing element of a given configuration with the
// dot-product workload of tb_axp_pe_body.svh. finished rises when the workload is
// over; checks and failures then hold the outcome. Used by tb_axp_pe_workloads.
module tb_pe_workload #(
  parameter int    W      = 32,
  parameter int    NW     = 64,
  parameter int    NIN    = 16,
  parameter int    AB     = W / 2,
  parameter int    LAYERS = 2,
  parameter int    FRAMES = 60,
  parameter string NAME   = "pe"
);
  localparam int E   = (W == 16) ? 5 : 8;
  localparam int M   = (W == 16) ? 10 : 23;
  localparam int ABW = $clog2(AB + 1);
  localparam int MAW = $clog2(NW * NIN);

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic [ABW-1:0] cfg_abit;
  logic           am_clear, ld_en;
  logic [1:0]     ld_target;
  logic [MAW-1:0] ld_addr;
  logic [AB-1:0]  ld_data;
  logic           in_valid, in_first, in_last;
  logic [W-1:0]   in_act, in_wgt;
  logic           prod_valid, prod_hit, done;
  logic [W-1:0]   prod, acc, result;

  axp_pe #(.W(W), .N_W(NW), .N_IN(NIN), .ABIT(AB)) dut (.*);

`include "tb_axp_pe_body.svh"
endmodule
