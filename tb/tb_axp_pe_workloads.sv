// tb_axp_pe_workloads: the processing element in the memory configurations the
// benchmarks call for, each running two layers of clustered dot products:
//   ic32     single precision, 16 weight rows, 16 input rows, 16-bit words
//   ks32     single precision, 512 weight rows, 16 input rows, 16-bit words
//   nin64    single precision, 64 weight rows, 64 input rows, 16-bit words
//   exact32  single precision, 16/16 rows, 32-bit words (matching on all bits)
//   or16     half precision, 64 weight rows, 16 input rows, 8-bit words
//   a10_16   half precision, 64/16 rows, 10-bit words (matching on up to 10 bits)
//   ks16     half precision, 512 weight rows, 16 input rows, 16-bit words
// The default configuration (64/16, single precision, 16-bit words) is covered
// by tb_axp_pe.
module tb_axp_pe_workloads;
  int checks = 0, failures = 0;

  tb_pe_workload #(.W(32), .NW(16),  .NIN(16), .AB(16), .NAME("ic32"))    u_ic32    ();
  tb_pe_workload #(.W(32), .NW(512), .NIN(16), .AB(16), .NAME("ks32"))    u_ks32    ();
  tb_pe_workload #(.W(32), .NW(64),  .NIN(64), .AB(16), .NAME("nin64"))   u_nin64   ();
  tb_pe_workload #(.W(32), .NW(16),  .NIN(16), .AB(32), .NAME("exact32")) u_exact32 ();
  tb_pe_workload #(.W(16), .NW(64),  .NIN(16), .AB(8),  .NAME("or16"))    u_or16    ();
  tb_pe_workload #(.W(16), .NW(64),  .NIN(16), .AB(10), .NAME("a10_16"))  u_a10_16  ();
  tb_pe_workload #(.W(16), .NW(512), .NIN(16), .AB(16), .NAME("ks16"))    u_ks16    ();

  initial begin
    fork
      wait (u_ic32.finished && u_ks32.finished && u_nin64.finished && u_exact32.finished &&
            u_or16.finished && u_a10_16.finished && u_ks16.finished);
      begin
        repeat (600000) @(posedge u_ic32.clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    checks   = u_ic32.checks + u_ks32.checks + u_nin64.checks + u_exact32.checks +
               u_or16.checks + u_a10_16.checks + u_ks16.checks;
    failures = failures + u_ic32.failures + u_ks32.failures + u_nin64.failures +
               u_exact32.failures + u_or16.failures + u_a10_16.failures + u_ks16.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
