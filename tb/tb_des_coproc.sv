// Self-checking testbench of des_coproc driven by the Leon3 pipeline model.
// A program loads a key and a block with LDDC, starts an encryption, loads
// the ciphertext while the encryption runs, starts a decryption, and stores
// both results with STDC; results are compared with known-answer DES
// vectors. It also checks key readback, the status register, the
// condition codes seen by a coprocessor branch, an unimplemented CPOP
// (exception, acknowledge, STDCQ queue contents), and that annulled and
// trapped loads change nothing. The program is run once without and once
// with random processor stalls. The stall and interlock mechanisms must
// each occur.
module tb_des_coproc;
  import cp_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge for the asynchronous resets
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  cp_in_t  cpi;
  cp_out_t cpo;
  logic    start, done, ext_stall;

  des_coproc dut (.clk, .rst_n, .cpi, .cpo);
  leon3_cp_model #(.NPROG(64)) cpu (.clk, .rst_n, .start, .cp_en(1'b1), .ext_stall, .cpo, .cpi, .done);

  localparam logic [63:0] K = 64'h133457799bbcdff1;
  localparam logic [63:0] P = 64'h0123456789abcdef;
  localparam logic [63:0] C = 64'h85e813540f0ab405;
  localparam logic [63:0] K2 = 64'h0123456789abcdef;
  localparam logic [63:0] P2 = 64'h4e6f772069732074;
  localparam logic [63:0] C2 = 64'h3fa40e8a984d4815;
  localparam logic [31:0] NOP = 32'h0100_0000;
  localparam logic [31:0] CB  = {2'b00, 5'd0, 3'b111, 22'd0};

  int n;
  int i_stc_e1, i_stc_d1, i_key, i_csr, i_cb, i_bad, i_q, i_an, i_tr, i_e2, i_d2;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic put(logic [31:0] inst, logic [31:0] ld0 = '0, logic [31:0] ld1 = '0,
                     bit annul = 1'b0, bit trap = 1'b0);
    cpu.prog_inst[n]  = inst;
    cpu.prog_ld[n][0] = ld0;
    cpu.prog_ld[n][1] = ld1;
    cpu.prog_annul[n] = annul;
    cpu.prog_trap[n]  = trap;
    n++;
  endtask

  task automatic build();
    n = 0;
    put(cp_ldst(OP3_LDDC, 5'd0), K[63:32], K[31:0]);
    put(cp_ldst(OP3_LDDC, 5'd2), P[63:32], P[31:0]);
    put(cp_cpop(OP3_CPOP1, 9'd1));
    put(cp_ldst(OP3_LDDC, 5'd2), C[63:32], C[31:0]);   // next block while encrypting
    put(cp_cpop(OP3_CPOP1, 9'd2));
    // the branch leaves the exception stage only when the STDC behind it has
    // waited for the encryption, so it sees: encryption done, decryption busy
    i_cb = n;     put(CB);
    i_stc_e1 = n; put(cp_ldst(OP3_STDC, 5'd4));
    i_stc_d1 = n; put(cp_ldst(OP3_STDC, 5'd6));
    i_key = n;    put(cp_ldst(OP3_STDC, 5'd0));
    i_csr = n;    put(cp_ldst(OP3_STCSR, 5'd0));
    i_bad = n;    put(cp_cpop(OP3_CPOP1, 9'd5));
    put(NOP); put(NOP); put(NOP);
    i_q = n;      put(cp_ldst(OP3_STDCQ, 5'd0));
    put(cp_ldst(OP3_LDC, 5'd0), 32'hdead_beef, '0, 1'b1, 1'b0);  // annulled
    put(cp_ldst(OP3_LDC, 5'd1), 32'hbad0_bad0, '0, 1'b0, 1'b1);  // trapped
    i_an = n;     put(cp_ldst(OP3_STC, 5'd0));
    i_tr = n;     put(cp_ldst(OP3_STC, 5'd1));
    // second key, both directions back to back
    put(cp_ldst(OP3_LDC, 5'd0), K2[63:32]);
    put(cp_ldst(OP3_LDC, 5'd1), K2[31:0]);
    put(cp_ldst(OP3_LDDC, 5'd2), P2[63:32], P2[31:0]);
    put(cp_cpop(OP3_CPOP1, 9'd1));
    put(cp_ldst(OP3_LDDC, 5'd2), C2[63:32], C2[31:0]);
    put(cp_cpop(OP3_CPOP1, 9'd2));
    i_e2 = n;     put(cp_ldst(OP3_STDC, 5'd4));
    i_d2 = n;     put(cp_ldst(OP3_STDC, 5'd6));
    cpu.nprog = n;
  endtask

  task automatic run_and_check(string tag);
    @(posedge clk); #1 start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    while (!done) @(posedge clk);
    #1;
    check({cpu.st_val[i_stc_e1][0], cpu.st_val[i_stc_e1][1]} == C, {tag, " encryption result"});
    check({cpu.st_val[i_stc_d1][0], cpu.st_val[i_stc_d1][1]} == P, {tag, " decryption result"});
    check({cpu.st_val[i_key][0], cpu.st_val[i_key][1]} == K, {tag, " key readback"});
    check(cpu.st_val[i_csr][0][4:3] == 2'b00 && cpu.st_val[i_csr][0][31] == 1'b0, {tag, " status idle, no exception"});
    check(cpu.cc_at_commit[i_cb] == 2'b10 && cpu.ccv_at_commit[i_cb], $sformatf("%s cc: encryption done, decryption busy (cc=%b ccv=%b)", tag, cpu.cc_at_commit[i_cb], cpu.ccv_at_commit[i_cb]));
    check(cpu.st_val[i_q][0] == 32'h4000_0000 + 32'(i_bad) * 4, {tag, " queue address"});
    check(cpu.st_val[i_q][1] == cp_cpop(OP3_CPOP1, 9'd5), {tag, " queue instruction"});
    check(cpu.st_val[i_an][0] == K[63:32], {tag, " annulled load has no effect"});
    check(cpu.st_val[i_tr][0] == K[31:0], {tag, " trapped load has no effect"});
    check({cpu.st_val[i_e2][0], cpu.st_val[i_e2][1]} == C2, {tag, " second encryption"});
    check({cpu.st_val[i_d2][0], cpu.st_val[i_d2][1]} == P2, {tag, " second decryption"});
    check(cpu.st_seen[i_stc_e1] == 2 && cpu.st_seen[i_q] == 2, {tag, " double stores take two passes"});
    check(cpu.exacks == 1, $sformatf("%s exception acknowledged once (%0d)", tag, cpu.exacks));
    check(cpu.flushes == 1, {tag, " one trap flush"});
    check(cpu.hold_cycles > 0, {tag, " coprocessor stalled the processor"});
    check(cpu.lock_cycles > 0, {tag, " load interlock used"});
    check(!cpo.exc, {tag, " exception cleared"});
    $display("%s: %0d cycles, %0d stall cycles from the coprocessor, %0d interlock cycles",
             tag, cpu.cycles, cpu.hold_cycles, cpu.lock_cycles);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; ext_stall = 1'b0;
    build();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_and_check("no stalls");
    fork
      run_and_check("random stalls");
      begin
        while (1) begin
          @(posedge clk); #2 ext_stall = ($urandom % 4) == 0;
        end
      end
    join_any
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
