// Self-checking testbench of icap_ctrl: register access over AHB, a
// bitstream streamed as one pipelined burst into an ICAP model (words must
// arrive bit-swapped per byte, in order, at one word per cycle when the
// port is never busy), the same with the port randomly busy (wait states
// must appear and no word may be lost or repeated), the word counter and
// the per-region connect bits.
module tb_icap_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge for the asynchronous resets
  always #5 clk = ~clk;

  localparam int NCPU = 4;
  int checks = 0, failures = 0;

  logic            hsel, hwrite, hreadyout;
  logic [31:0]     haddr, hwdata, hrdata;
  logic [1:0]      htrans, hresp;
  logic [2:0]      hsize;
  logic            ce_n, write_n, busy;
  logic [31:0]     icap_i, icap_o;
  logic [NCPU-1:0] connect;

  icap_ctrl #(.NCPU(NCPU)) dut (
    .hclk(clk), .hresetn(rst_n), .hsel, .haddr, .hwrite, .htrans, .hsize, .hwdata,
    .hready(hreadyout), .hreadyout, .hresp, .hrdata,
    .icap_ce_n(ce_n), .icap_write_n(write_n), .icap_i, .icap_o, .icap_busy(busy), .connect
  );
  icap_model u_icap (.clk, .ce_n, .write_n, .i(icap_i), .o(icap_o), .busy);
  ahb_master_bfm bfm (.clk, .hsel, .haddr, .hwrite, .htrans, .hsize, .hwdata, .hreadyout, .hrdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] swapped(logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = {<<{w[8*b +: 8]}};
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int cyc, n, base;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    bfm.read1(32'h0000_000C, r);
    check(r == 0 && connect == 0, "regions disconnected after reset");
    bfm.write1(32'h0000_000C, 32'h0000_0005);
    bfm.read1(32'h0000_000C, r);
    check(r == 5 && connect == 4'b0101, "connect register");
    check(hresp == 2'b00, "OKAY response");

    // burst without ICAP busy: one word per cycle
    n = 256;
    for (int i = 0; i < n; i++) bfm.wbuf[i] = {$urandom};
    bfm.wbuf[0] = 32'hAA99_5566;   // a configuration sync word
    bfm.xfer(32'h0000_0000, n, 1'b1, 1'b0, cyc);
    repeat (3) @(posedge clk);
    check(u_icap.nwords == n, $sformatf("%0d words reached the ICAP, expected %0d", u_icap.nwords, n));
    check(cyc == n + 1, $sformatf("burst of %0d words took %0d cycles, expected %0d", n, cyc, n + 1));
    check(u_icap.words[0] == 32'h55_99_AA_66, "sync word bit-swapped per byte");
    for (int i = 0; i < n; i++)
      check(u_icap.words[i] == swapped(bfm.wbuf[i]), $sformatf("word %0d", i));
    bfm.read1(32'h0000_0008, r);
    check(r == n, $sformatf("word counter %0d", r));
    bfm.read1(32'h0000_0004, r);
    check(r[1:0] == 2'b00, "status idle");

    // clear the counter, then a burst against a busy ICAP
    bfm.write1(32'h0000_0008, 32'd0);
    base = u_icap.nwords;
    u_icap.busy_pct = 40;
    n = 300;
    for (int i = 0; i < n; i++) bfm.wbuf[i] = {$urandom};
    bfm.xfer(32'h0000_0000, n, 1'b1, 1'b0, cyc);
    u_icap.busy_pct = 0;
    repeat (4) @(posedge clk);
    check(u_icap.nwords - base == n, $sformatf("busy: %0d words arrived, expected %0d", u_icap.nwords - base, n));
    for (int i = 0; i < n; i++)
      check(u_icap.words[base + i] == swapped(bfm.wbuf[i]), $sformatf("busy: word %0d", i));
    check(bfm.stall_cycles > 0 && u_icap.busy_cycles > 0, "wait states inserted while the ICAP is busy");
    bfm.read1(32'h0000_0008, r);
    check(r == n, $sformatf("word counter after clear %0d", r));
    bfm.read1(32'h0000_0000, r);
    check(r == u_icap.nwords, "ICAP output readable");
    $display("busy burst: %0d words in %0d cycles, %0d wait states", n, cyc, bfm.stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
