// Behavioural model of the FPGA's Internal Configuration Access Port, for
// testbenches only. It takes a 32-bit word on a rising edge where CE and
// WRITE are low and BUSY is low, and stores it in 'words' in arrival order.
// BUSY is raised at random with a probability of busy_pct percent, set by
// the testbench, so that the controller's flow control is exercised (the
// real port raises BUSY mainly during readback). O returns the number of
// words received, standing in for the port's status output.
module icap_model #(
  parameter int DEPTH = 4096
) (
  input  logic        clk,
  input  logic        ce_n,
  input  logic        write_n,
  input  logic [31:0] i,
  output logic [31:0] o,
  output logic        busy
);
  logic [31:0] words [DEPTH];
  int          nwords = 0;
  int          busy_pct = 0;
  int          busy_cycles = 0;

  initial busy = 1'b0;

  always @(posedge clk) begin
    if (!ce_n && !write_n && !busy) begin
      if (nwords < DEPTH) words[nwords] = i;
      nwords++;
    end
    if (busy) busy_cycles++;
    busy <= (busy_pct > 0) && (($urandom % 100) < busy_pct);
  end

  assign o = 32'(nwords);
endmodule
