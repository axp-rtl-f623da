// axp_pkg: types and constants shared by the associative processing element.
//
// The processing element multiplies IEEE 754 operands either in a floating-point
// multiplier or by looking the product up in an associative memory. The memory is
// filled from outside before inference through one load port; ld_target_e selects
// which of its three arrays a load write goes to. The two floating-point formats
// the element is built for (single and half precision) are given here by their
// exponent and fraction widths.
package axp_pkg;

  // Destination of a load-port write into the associative memory.
  typedef enum logic [1:0] {
    LD_INPUT_CAM  = 2'd0,  // one row of the inputs (activations) CAM
    LD_WEIGHT_CAM = 2'd1,  // one row of the weights CAM
    LD_RESULTS    = 2'd2   // one word of the results memory
  } ld_target_e;

  // IEEE 754 binary32
  localparam int unsigned FP32_EXP_W = 8;
  localparam int unsigned FP32_MAN_W = 23;
  // IEEE 754 binary16
  localparam int unsigned FP16_EXP_W = 5;
  localparam int unsigned FP16_MAN_W = 10;

endpackage
