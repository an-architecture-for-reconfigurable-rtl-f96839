// Self-checking testbench of cp_glue: for random coprocessor outputs and all
// four combinations of PSR.EC and the connect bit, the processor must see
// the coprocessor only when both are set, and an idle coprocessor (no stall,
// no interlock, no exception, valid zero condition codes) otherwise.
module tb_cp_glue;
  import cp_pkg::*;
  int checks = 0, failures = 0;
  logic    psr_ec, connect, enabled;
  cp_out_t cpo_region, cpo_cpu;

  cp_glue dut (.psr_ec, .connect, .cpo_region, .cpo_cpu, .enabled);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      psr_ec = n[0]; connect = n[1];
      cpo_region = {$urandom, $urandom};
      cpo_region.holdn = 1'b0; cpo_region.ldlock = 1'b1; cpo_region.exc = 1'b1;
      cpo_region.ccv = 1'b0;
      #1;
      if (n[0] && n[1]) begin
        check(enabled, "enabled");
        check(cpo_cpu == cpo_region, "connected coprocessor passes through");
      end else begin
        check(!enabled, "disabled");
        check(cpo_cpu.holdn && !cpo_cpu.ldlock && !cpo_cpu.exc, "no stall, interlock or exception");
        check(cpo_cpu.ccv && cpo_cpu.cc == 2'b00 && cpo_cpu.stdata == 32'd0, "idle condition codes and data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
