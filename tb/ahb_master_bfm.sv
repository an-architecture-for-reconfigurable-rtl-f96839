// Minimal AHB-Lite master for testbenches: pipelined single-word bursts of
// writes or reads to consecutive or fixed addresses. Signals change at the
// falling edge; HREADY is the addressed slave's HREADYOUT. 'cycles' returns
// the clock cycles a transfer sequence took.
module ahb_master_bfm (
  input  logic        clk,
  output logic        hsel,
  output logic [31:0] haddr,
  output logic        hwrite,
  output logic [1:0]  htrans,
  output logic [2:0]  hsize,
  output logic [31:0] hwdata,
  input  logic        hreadyout,
  input  logic [31:0] hrdata
);
  logic [31:0] wbuf [20480];
  logic [31:0] rbuf [20480];
  int          stall_cycles = 0;

  initial begin
    hsel = 1'b0; haddr = '0; hwrite = 1'b0; htrans = 2'b00; hsize = 3'b010; hwdata = '0;
  end

  // n transfers; incr=1 steps the address by 4, incr=0 keeps it
  task automatic xfer(input logic [31:0] addr, input int n, input bit wr, input bit incr, output int cycles);
    int ai, di;
    bit rdy;
    logic [31:0] rd;
    ai = 0; di = -1; cycles = 0;
    while (ai < n || di >= 0) begin
      @(negedge clk);
      if (ai < n) begin
        hsel = 1'b1; htrans = (ai == 0) ? 2'b10 : 2'b11; hwrite = wr;
        haddr = incr ? addr + 32'(ai) * 4 : addr;
      end else begin
        hsel = 1'b0; htrans = 2'b00;
      end
      hwdata = (di >= 0) ? wbuf[di] : 32'd0;
      #1 rdy = hreadyout;
      rd = hrdata;
      @(posedge clk);
      cycles++;
      if (rdy) begin
        if (di >= 0 && !wr) rbuf[di] = rd;
        di = (ai < n) ? ai : -1;
        if (ai < n) ai++;
      end else stall_cycles++;
    end
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00;
  endtask

  task automatic write1(input logic [31:0] addr, input logic [31:0] data);
    int c;
    wbuf[0] = data;
    xfer(addr, 1, 1'b1, 1'b0, c);
  endtask

  task automatic read1(input logic [31:0] addr, output logic [31:0] data);
    int c;
    xfer(addr, 1, 1'b0, 1'b0, c);
    data = rbuf[0];
  endtask
endmodule
