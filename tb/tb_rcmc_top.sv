// End-to-end testbench of rcmc_top with its default parameters (four
// cores). Four Leon3 pipeline models, one AHB master and an ICAP model
// surround the design. The sequence:
//  1. coprocessor disabled (PSR.EC clear, region disconnected): coprocessor
//     instructions trap as cp_disabled and the processor sees an idle
//     coprocessor;
//  2. a partial bitstream of 79,964 bytes (19,991 words) is written through
//     the AHB slave into the ICAP, with the port randomly busy;
//  3. all regions are connected and enabled and all four cores run DES
//     programs at once (encrypt, decrypt, result stores, an unimplemented
//     operation with its exception and queue, a trapped load), with random
//     processor stalls;
//  4. one region is disconnected (masked, held in reset) and reconnected: it
//     must come back with cleared registers.
// Every mechanism (cp_disabled trap, masking, reconfiguration wait states,
// coprocessor stall, interlock, trap flush, exception acknowledge, double
// transfers, four cores ciphering at once, region reset) is counted and
// must occur.
module tb_rcmc_top;
  import cp_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge for the asynchronous resets
  always #5 clk = ~clk;

  localparam int NCPU = 4;
  localparam int BITSTREAM_BYTES = 79964;
  localparam int BITSTREAM_WORDS = (BITSTREAM_BYTES + 3) / 4;

  int checks = 0, failures = 0;

  logic [NCPU-1:0] psr_ec, cp_enabled, done, ext_stall;
  cp_in_t          cpi [NCPU];
  cp_out_t         cpo [NCPU];
  logic            hsel, hwrite, hreadyout;
  logic [31:0]     haddr, hwdata, hrdata;
  logic [1:0]      htrans, hresp;
  logic [2:0]      hsize;
  logic            ce_n, write_n, busy;
  logic [31:0]     icap_i, icap_o;

  rcmc_top dut (
    .clk, .rst_n, .psr_ec, .cpi, .cpo,
    .hsel, .haddr, .hwrite, .htrans, .hsize, .hwdata, .hready(hreadyout), .hreadyout, .hresp, .hrdata,
    .icap_ce_n(ce_n), .icap_write_n(write_n), .icap_i, .icap_o, .icap_busy(busy), .cp_enabled
  );
  icap_model #(.DEPTH(BITSTREAM_WORDS)) u_icap (.clk, .ce_n, .write_n, .i(icap_i), .o(icap_o), .busy);
  ahb_master_bfm bfm (.clk, .hsel, .haddr, .hwrite, .htrans, .hsize, .hwdata, .hreadyout, .hrdata);


  // mechanism counters
  int n_cpdis, n_masked, n_icap_wait, n_hold, n_lock, n_flush, n_exack, n_double, n_all4, n_reset;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] bitstream_word(int i);
    return (i == 0) ? 32'hAA99_5566 : (32'(i) * 32'h9E37_79B9) ^ 32'h5A5A_0000;
  endfunction

  function automatic logic [31:0] swapped(logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = {<<{w[8*b +: 8]}};
    return r;
  endfunction

  // monitors
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCPU; c++)
      if (!cp_enabled[c]) begin
        n_masked++;
        if (cpo[c] != CP_OUT_IDLE) begin
          failures++;
          $display("FAIL: core %0d sees a disabled coprocessor", c);
        end
      end
    if (dut.g_tile[0].u_coproc.enc_busy && dut.g_tile[1].u_coproc.enc_busy &&
        dut.g_tile[2].u_coproc.enc_busy && dut.g_tile[3].u_coproc.enc_busy) n_all4++;
  end

  // per-core test program runners
  int   cmd [NCPU];
  int   cmd_arg [NCPU];
  logic [NCPU-1:0] ack;
  int   r_checks [NCPU], r_failures [NCPU], r_cpdis [NCPU], r_hold [NCPU], r_lock [NCPU],
        r_flush [NCPU], r_exack [NCPU], r_double [NCPU], r_reset [NCPU];

  for (genvar g = 0; g < NCPU; g++) begin : g_core
    des_prog_runner #(.ID(g)) u_run (
      .clk, .rst_n, .cp_en(psr_ec[g]), .ext_stall(ext_stall[g]), .cpo(cpo[g]), .cpi(cpi[g]),
      .cmd(cmd[g]), .arg(cmd_arg[g]), .ack(ack[g]),
      .checks(r_checks[g]), .failures(r_failures[g]), .n_cpdis(r_cpdis[g]), .n_hold(r_hold[g]),
      .n_lock(r_lock[g]), .n_flush(r_flush[g]), .n_exack(r_exack[g]), .n_double(r_double[g]),
      .n_reset(r_reset[g])
    );
    assign done[g] = ack[g];
  end

  task automatic do_cmd(int c, int op, int arg = 0);
    cmd_arg[c] = arg;
    cmd[c] = op;
    wait (ack[c]);
    cmd[c] = 0;
    wait (!ack[c]);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int cyc;
    bit stalls_on;
    psr_ec = '0; ext_stall = '0;
    for (int c = 0; c < NCPU; c++) begin cmd[c] = 0; cmd_arg[c] = 0; end
    {n_cpdis, n_masked, n_icap_wait, n_hold, n_lock, n_flush, n_exack, n_double, n_all4, n_reset} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. disabled coprocessor
    do_cmd(0, 1);

    // 2. reconfiguration through the ICAP
    for (int i = 0; i < BITSTREAM_WORDS; i++) bfm.wbuf[i] = bitstream_word(i);
    u_icap.busy_pct = 5;
    bfm.xfer(32'h0000_0000, BITSTREAM_WORDS, 1'b1, 1'b0, cyc);
    u_icap.busy_pct = 0;
    repeat (3) @(posedge clk);
    n_icap_wait = bfm.stall_cycles;
    check(u_icap.nwords == BITSTREAM_WORDS, $sformatf("%0d bitstream words reached the ICAP", u_icap.nwords));
    for (int i = 0; i < BITSTREAM_WORDS; i++)
      if (u_icap.words[i] != swapped(bitstream_word(i))) begin
        check(1'b0, $sformatf("bitstream word %0d", i));
        break;
      end
    check(1'b1, "bitstream contents");
    bfm.read1(32'h0000_0008, r);
    check(r == BITSTREAM_WORDS, "word counter");
    $display("bitstream of %0d bytes: %0d cycles (%0d wait states), %.3f ms at 70 MHz",
             BITSTREAM_BYTES, cyc, bfm.stall_cycles, real'(cyc) / 70.0e3);

    // 3. all cores ciphering at once
    bfm.write1(32'h0000_000C, 32'h0000_000F);
    psr_ec = '1;
    @(posedge clk);
    check(cp_enabled == 4'hF, "all coprocessors enabled");
    stalls_on = 1'b1;
    fork
      begin
        fork
          do_cmd(0, 2, 0);
          do_cmd(1, 2, 2);
          do_cmd(2, 2, 4);
          do_cmd(3, 2, 6);
        join
        stalls_on = 1'b0;
      end
      while (stalls_on) begin
        @(negedge clk) ext_stall = {$urandom} % 16 == 0 ? 4'hF : 4'h0;
      end
    join
    ext_stall = '0;

    // 4. disconnect and reconnect region 2
    psr_ec[2] = 1'b0;
    bfm.write1(32'h0000_000C, 32'h0000_000B);
    bfm.read1(32'h0000_000C, r);
    check(r == 32'hB && !cp_enabled[2] && cpo[2] == CP_OUT_IDLE, "region 2 disconnected and masked");
    bfm.write1(32'h0000_000C, 32'h0000_000F);
    psr_ec[2] = 1'b1;
    do_cmd(2, 3);
    do_cmd(1, 2, 0);

    for (int c = 0; c < NCPU; c++) begin
      checks += r_checks[c]; failures += r_failures[c];
      n_cpdis += r_cpdis[c]; n_hold += r_hold[c]; n_lock += r_lock[c]; n_flush += r_flush[c];
      n_exack += r_exack[c]; n_double += r_double[c]; n_reset += r_reset[c];
    end
    $display("mechanisms: cp_disabled traps %0d, masked core-cycles %0d, ICAP wait states %0d, coprocessor stall cycles %0d, interlock cycles %0d, trap flushes %0d, exceptions acknowledged %0d, double-store passes %0d, cycles with 4 cores ciphering %0d, region resets %0d",
             n_cpdis, n_masked, n_icap_wait, n_hold, n_lock, n_flush, n_exack, n_double, n_all4, n_reset);
    check(n_cpdis > 0, "cp_disabled trap occurred");
    check(n_masked > 0, "glue masking occurred");
    check(n_icap_wait > 0, "ICAP wait states occurred");
    check(n_hold > 0, "coprocessor stall occurred");
    check(n_lock > 0, "interlock occurred");
    check(n_flush > 0, "trap flush occurred");
    check(n_exack > 0, "exception acknowledge occurred");
    check(n_double > 0, "double transfer occurred");
    check(n_all4 > 0, "four cores ciphered at once");
    check(n_reset > 0, "region reset on reconnect occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
