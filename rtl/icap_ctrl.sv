// Reconfiguration controller: an AHB slave through which any processor core
// writes partial bitstreams into the FPGA's Internal Configuration Access
// Port (ICAP), and which connects or disconnects each coprocessor region.
//
// Register map (word offsets, 32-bit accesses):
//   0x0 DATA     W: one bitstream word for the ICAP.     R: last ICAP output
//   0x4 STATUS   R: bit 0 ICAP busy, bit 1 a word is waiting for the ICAP
//   0x8 COUNT    R: bitstream words sent since the last clear; W: clear
//   0xC CONNECT  R/W: bit i connects coprocessor region i to core i
//
// A DATA write lands in a one-word buffer and is offered to the ICAP on the
// following cycles (CE and WRITE low) until the ICAP takes it, which it does
// on an edge where BUSY is low. A DATA write that finds the buffer still
// full is stretched with HREADYOUT low, so the bus master never outruns the
// ICAP: sustained rate is one word per cycle. Each byte's bits are
// reversed on the way to the ICAP (the Virtex-5 ICAP expects bit 0 of each
// byte where a bitstream file holds bit 7; set BITSWAP=0 for a port that
// does not). Bitstream parsing, CRC checks and the mutual exclusion between
// cores are left to software.
//
// AHB-Lite slave, no split/retry, always OKAY. The register map, the
// one-word buffer, the byte bit-swap and the CONNECT register are this
// design's own; the controller's role as an AHB slave shared by all cores
// comes from the architecture. All registers reset to zero (all regions
// disconnected).
module icap_ctrl #(
  parameter int unsigned NCPU    = 4,
  parameter bit          BITSWAP = 1'b1
) (
  input  logic            hclk,
  input  logic            hresetn,
  // AHB-Lite slave
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
  // ICAP primitive (same clock)
  output logic            icap_ce_n,
  output logic            icap_write_n,
  output logic [31:0]     icap_i,
  input  logic [31:0]     icap_o,
  input  logic            icap_busy,
  // coprocessor regions
  output logic [NCPU-1:0] connect
);

  typedef enum logic [1:0] {
    REG_DATA    = 2'd0,
    REG_STATUS  = 2'd1,
    REG_COUNT   = 2'd2,
    REG_CONNECT = 2'd3
  } reg_e;

  // address phase captured for the data phase
  logic        dp_valid, dp_write;
  reg_e        dp_reg;

  logic        buf_valid;
  logic [31:0] buf_word;
  logic [31:0] count_q;
  logic [31:0] icap_o_q;

  logic        icap_take;   // ICAP accepts the buffered word at this edge
  logic        dp_stall;    // data-phase DATA write must wait

  function automatic logic [31:0] swap_bits(logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++) r[8*b+i] = w[8*b+7-i];
    return r;
  endfunction

  assign icap_take = buf_valid && !icap_busy;
  assign dp_stall  = dp_valid && dp_write && dp_reg == REG_DATA && buf_valid && !icap_take;

  assign hreadyout = !dp_stall;
  assign hresp     = 2'b00;

  assign icap_ce_n    = !buf_valid;
  assign icap_write_n = !buf_valid;
  assign icap_i       = BITSWAP ? swap_bits(buf_word) : buf_word;

  always_comb begin
    unique case (dp_reg)
      REG_DATA:    hrdata = icap_o_q;
      REG_STATUS:  hrdata = {30'd0, buf_valid, icap_busy};
      REG_COUNT:   hrdata = count_q;
      REG_CONNECT: hrdata = {{(32-NCPU){1'b0}}, connect};
      default:     hrdata = '0;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_valid  <= 1'b0;
      dp_write  <= 1'b0;
      dp_reg    <= REG_DATA;
      buf_valid <= 1'b0;
      buf_word  <= '0;
      count_q   <= '0;
      icap_o_q  <= '0;
      connect   <= '0;
    end else begin
      if (icap_take) begin
        buf_valid <= 1'b0;
        count_q   <= count_q + 32'd1;
      end
      if (!icap_busy) icap_o_q <= icap_o;
      // data phase of a write (completes when not stalled)
      if (dp_valid && dp_write && !dp_stall) begin
        unique case (dp_reg)
          REG_DATA: begin
            buf_valid <= 1'b1;
            buf_word  <= hwdata;
          end
          REG_COUNT:   count_q <= icap_take ? 32'd1 : 32'd0;
          REG_CONNECT: connect <= hwdata[NCPU-1:0];
          default: ;
        endcase
      end
      // address phase
      if (hready && hreadyout) begin
        dp_valid <= hsel && htrans[1];
        dp_write <= hwrite;
        dp_reg   <= reg_e'(haddr[3:2]);
      end
    end
  end

  // only word accesses are decoded
  assert property (@(posedge hclk) disable iff (!hresetn)
                   (hsel && htrans[1] && hready) |-> hsize == 3'b010);

endmodule
