// Reconfigurable part of a Leon3 SMP system with one tightly coupled,
// reconfigurable coprocessor per core.
//
// For each of the NCPU cores there is one coprocessor region (here holding
// the DES coprocessor, des_coproc) and its glue logic (cp_glue). The region
// talks to its core through the reduced coprocessor interface (cp_in_t /
// cp_out_t, 162 signals); the processor cores themselves, the shared AMBA
// AHB bus, the memory controller and the debug unit are outside this block,
// so the interface records and the controller's AHB slave port are ports of
// the top. One reconfiguration controller (icap_ctrl) on the AHB bus lets
// any core reprogram any region through the ICAP, and connects each region
// to its core. A region that is not connected is held in reset and is
// masked from its core by the glue logic, so a region under reprogramming
// can neither disturb its processor nor start from stale state.
//
// Timing: everything runs on one clock (70 MHz target in the reference
// system). Coprocessor timing follows the processor pipeline, see cp_pipe.
// NCPU = 4 is the main configuration; holding unconnected regions in reset
// is this design's choice.
module rcmc_top
  import cp_pkg::*;
#(
  parameter int unsigned NCPU = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // per-core coprocessor interface
  input  logic [NCPU-1:0] psr_ec,
  input  cp_in_t          cpi [NCPU],
  output cp_out_t         cpo [NCPU],
  // AHB-Lite slave port of the reconfiguration controller
  input  logic            hsel,
  input  logic [31:0]     haddr,
  input  logic            hwrite,
  input  logic [1:0]      htrans,
  input  logic [2:0]      hsize,
  input  logic [31:0]     hwdata,
  input  logic            hready,
  output logic            hreadyout,
  output logic [1:0]      hresp,
  output logic [31:0]     hrdata,
  // ICAP primitive
  output logic            icap_ce_n,
  output logic            icap_write_n,
  output logic [31:0]     icap_i,
  input  logic [31:0]     icap_o,
  input  logic            icap_busy,
  // per-core state, for monitoring
  output logic [NCPU-1:0] cp_enabled
);

  logic [NCPU-1:0] connect;

  icap_ctrl #(.NCPU(NCPU)) u_icap (
    .hclk(clk), .hresetn(rst_n),
    .hsel, .haddr, .hwrite, .htrans, .hsize, .hwdata, .hready, .hreadyout, .hresp, .hrdata,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_o, .icap_busy,
    .connect
  );

  for (genvar i = 0; i < NCPU; i++) begin : g_tile
    cp_out_t region_out;
    logic    region_rst_n;

    assign region_rst_n = rst_n && connect[i];

    des_coproc u_coproc (
      .clk, .rst_n(region_rst_n), .cpi(cpi[i]), .cpo(region_out)
    );

    cp_glue u_glue (
      .psr_ec(psr_ec[i]), .connect(connect[i]), .cpo_region(region_out),
      .cpo_cpu(cpo[i]), .enabled(cp_enabled[i])
    );
  end

endmodule
