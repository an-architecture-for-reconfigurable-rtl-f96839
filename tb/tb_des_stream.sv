// Workload testbench: the DES application's inner loop on one coprocessor,
// with memory that answers every load at once (no processor stalls).
// A stream of NBLK 64-bit blocks is encrypted with the loop
//   LDDC key; LDDC block0; CPOP1 enc;
//   for each block i: LDDC block i+1; STDC result; CPOP1 enc
// so that each block is loaded while the previous one is ciphered, then the
// ciphertexts are decrypted the same way. Checks: the first block against a
// known-answer vector, every block's round trip, and the steady-state block
// period. The period is worked out from the pipeline: the core is busy for
// the 17 cycles starting with the one in which the CPOP sits in the
// exception stage; meanwhile the result store waits in execute. In the next
// cycle the store's first pass leaves execute, then its second pass, then
// the next CPOP goes through execute and memory and reaches the exception
// stage: 17 + 4 = 21 cycles per block.
module tb_des_stream;
  import cp_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge for the asynchronous resets
  always #5 clk = ~clk;

  localparam int NBLK  = 96;
  localparam int NPROG = 6 + 3 * NBLK;
  localparam logic [63:0] K  = 64'h133457799bbcdff1;
  localparam logic [63:0] P0 = 64'h0123456789abcdef;
  localparam logic [63:0] C0 = 64'h85e813540f0ab405;
  localparam int PERIOD = 21;

  int checks = 0, failures = 0;
  cp_in_t  cpi;
  cp_out_t cpo;
  logic    start, done;

  des_coproc dut (.clk, .rst_n, .cpi, .cpo);
  leon3_cp_model #(.NPROG(NPROG)) cpu (.clk, .rst_n, .start, .cp_en(1'b1), .ext_stall(1'b0), .cpo, .cpi, .done);

  logic [63:0] plain [NBLK], cipher [NBLK], back [NBLK];
  int          start_cycle [NBLK];
  int          cyc = 0, nstart = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.enc_start || dut.dec_start) begin
      if (nstart < NBLK) start_cycle[nstart] = cyc;
      nstart++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int n;
  task automatic put(logic [31:0] inst, logic [63:0] ld = '0);
    cpu.prog_inst[n] = inst; cpu.prog_ld[n][0] = ld[63:32]; cpu.prog_ld[n][1] = ld[31:0];
    cpu.prog_annul[n] = 1'b0; cpu.prog_trap[n] = 1'b0;
    n++;
  endtask

  // run the loop over src[] in one direction; results into dst[]
  task automatic stream(bit dec, const ref logic [63:0] src [NBLK], ref logic [63:0] dst [NBLK]);
    logic [8:0] opc;
    logic [4:0] res;
    int first_st, per;
    opc = dec ? 9'd2 : 9'd1;
    res = dec ? 5'd6 : 5'd4;
    n = 0;
    put(cp_ldst(OP3_LDDC, 5'd0), K);
    put(cp_ldst(OP3_LDDC, 5'd2), src[0]);
    put(cp_cpop(OP3_CPOP1, opc));
    first_st = -1;
    for (int i = 0; i < NBLK; i++) begin
      if (i + 1 < NBLK) put(cp_ldst(OP3_LDDC, 5'd2), src[i + 1]);
      if (first_st < 0) first_st = n;
      put(cp_ldst(OP3_STDC, res));
      if (i + 1 < NBLK) put(cp_cpop(OP3_CPOP1, opc));
    end
    cpu.nprog = n;
    nstart = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(posedge clk);
    #1;
    for (int i = 0; i < NBLK; i++) begin
      int idx;
      idx = (i + 1 < NBLK) ? first_st + 3 * i : n - 1;
      dst[i] = {cpu.st_val[idx][0], cpu.st_val[idx][1]};
    end
    check(nstart == NBLK, $sformatf("%0d blocks started, expected %0d", nstart, NBLK));
    per = (start_cycle[NBLK - 1] - start_cycle[1]) / (NBLK - 2);
    check(per == PERIOD && (start_cycle[2] - start_cycle[1]) == PERIOD,
          $sformatf("block period %0d cycles, expected %0d", per, PERIOD));
    check(per >= 17, "never faster than the 17-cycle core");
    $display("%s: %0d blocks, %0d cycles per block, %.1f MB/s at 70 MHz", dec ? "decrypt" : "encrypt",
             NBLK, per, 8.0 * 70.0 / real'(per));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0;
    plain[0] = P0;
    for (int i = 1; i < NBLK; i++) plain[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    stream(1'b0, plain, cipher);
    check(cipher[0] == C0, "first block matches the known answer");
    stream(1'b1, cipher, back);
    for (int i = 0; i < NBLK; i++) check(back[i] == plain[i], $sformatf("block %0d round trip", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
