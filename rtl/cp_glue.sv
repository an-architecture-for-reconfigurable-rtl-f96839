// Glue logic between a Leon3 core and its reconfigurable coprocessor region.
//
// While the region is being reprogrammed its outputs are meaningless, so
// they must not reach the processor pipeline. The coprocessor is only
// usable when the coprocessor-enable bit of the processor state register
// (PSR bit 13, EC) is set; with EC clear the processor traps every
// coprocessor instruction (cp_disabled). The glue logic uses the same bit:
// unless EC is set and the region is marked connected (a per-core bit of
// the reconfiguration controller, set by the enable request and cleared by
// the disable request), the processor sees an idle coprocessor: no stall,
// no interlock, no exception, valid all-zero condition codes, zero store
// data. The processor-to-coprocessor record passes through unchanged.
// Purely combinational. Combining EC with a controller bit is this
// design's reading of the enable request, which both sets EC and
// "configures the glue logic".
module cp_glue
  import cp_pkg::*;
(
  input  logic    psr_ec,     // PSR bit 13 of the attached core
  input  logic    connect,    // region connected (reconfiguration controller)
  input  cp_out_t cpo_region, // from the reconfigurable region
  output cp_out_t cpo_cpu,    // to the processor
  output logic    enabled
);

  assign enabled = psr_ec && connect;
  assign cpo_cpu = enabled ? cpo_region : CP_OUT_IDLE;

endmodule
