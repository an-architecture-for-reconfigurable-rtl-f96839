// Test program runner for one core of the end-to-end testbench: a Leon3
// pipeline model plus the coprocessor programs run on it and their checks.
// A nonzero 'cmd' starts a program (1: coprocessor instructions while
// disabled, which must all trap; 2: two DES blocks from the vector table
// starting at 'arg', in both directions, with an unimplemented operation
// and a trapped load; 3: readback of a freshly reset region); 'ack' rises
// when it has finished and falls after 'cmd' returns to zero. Check and
// mechanism counts are outputs.
module des_prog_runner
  import cp_pkg::*;
#(
  parameter int ID = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cp_en,
  input  logic    ext_stall,
  input  cp_out_t cpo,
  output cp_in_t  cpi,
  input  int      cmd,
  input  int      arg,
  output logic    ack,
  output int      checks,
  output int      failures,
  output int      n_cpdis,
  output int      n_hold,
  output int      n_lock,
  output int      n_flush,
  output int      n_exack,
  output int      n_double,
  output int      n_reset
);
  // key, plaintext, ciphertext
  localparam logic [63:0] VEC [8][3] = '{
  '{64'h0123456789abcdef, 64'h4e6f772069732074, 64'h3fa40e8a984d4815},
  '{64'h133457799bbcdff1, 64'h0123456789abcdef, 64'h85e813540f0ab405},
  '{64'h91b7584a2265b1f5, 64'hcd613e30d8f16adf, 64'h119710c1ea2d0f9d},
  '{64'h1027c4d1c386bbc4, 64'h1e2feb89414c343c, 64'hc2e76a16e764c54e},
  '{64'hc2ce6f447ed4d57b, 64'h78e510617311d8a3, 64'h611dd5527508e69e},
  '{64'h612e7696a6cecc1b, 64'h35bf992dc9e9c616, 64'h1c576cf5669922f4},
  '{64'h7ce42c8218072e8c, 64'he4b06ce60741c7a8, 64'h60e3db76709910eb},
  '{64'h63ca828dd5f4b3b2, 64'h9b810e766ec9d286, 64'h915fd82fef5a6c9b}
  };
  localparam logic [31:0] NOP = 32'h0100_0000;
  localparam int g = ID;

  logic start, done;

  task automatic check(bit ok, string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
  endtask

  leon3_cp_model #(.NPROG(64)) cpu (
    .clk, .rst_n, .start, .cp_en, .ext_stall, .cpo, .cpi, .done
  );

  int n, i_e, i_d, i_q, i_bad, i_k, i_tr;

  task automatic put(logic [31:0] inst, logic [31:0] ld0 = '0, logic [31:0] ld1 = '0, bit trap = 1'b0);
    cpu.prog_inst[n] = inst; cpu.prog_ld[n][0] = ld0; cpu.prog_ld[n][1] = ld1;
    cpu.prog_annul[n] = 1'b0; cpu.prog_trap[n] = trap;
    n++;
  endtask

  task automatic go();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(posedge clk);
    #1;
  endtask

  // LDC/STC/CPOP while the coprocessor is disabled: all must trap
  task automatic run_disabled();
    n = 0;
    put(cp_ldst(OP3_LDC, 5'd0), 32'h1234_5678);
    put(cp_ldst(OP3_STC, 5'd0));
    put(cp_cpop(OP3_CPOP1, 9'd1));
    put(NOP);
    cpu.nprog = n;
    go();
    check(cpu.cpdis_traps == 3, $sformatf("core %0d: %0d cp_disabled traps, expected 3", g, cpu.cpdis_traps));
    n_cpdis += cpu.cpdis_traps;
  endtask

  // two DES blocks in both directions, plus exception and trap handling
  task automatic run_des(int v0);
    logic [63:0] k, p, c;
    n = 0;
    for (int b = 0; b < 2; b++) begin
      k = VEC[v0 + b][0]; p = VEC[v0 + b][1]; c = VEC[v0 + b][2];
      put(cp_ldst(OP3_LDDC, 5'd0), k[63:32], k[31:0]);
      put(cp_ldst(OP3_LDDC, 5'd2), p[63:32], p[31:0]);
      put(cp_cpop(OP3_CPOP1, 9'd1));
      put(cp_ldst(OP3_LDDC, 5'd2), c[63:32], c[31:0]);
      put(cp_cpop(OP3_CPOP1, 9'd2));
      if (b == 0) i_e = n; put(cp_ldst(OP3_STDC, 5'd4));
      if (b == 0) i_d = n; put(cp_ldst(OP3_STDC, 5'd6));
    end
    i_bad = n; put(cp_cpop(OP3_CPOP2, 9'd0));
    put(NOP); put(NOP);
    i_q = n;   put(cp_ldst(OP3_STDCQ, 5'd0));
    i_tr = n;  put(cp_ldst(OP3_LDC, 5'd0), 32'hFFFF_FFFF, '0, 1'b1);
    i_k = n;   put(cp_ldst(OP3_STDC, 5'd0));
    cpu.nprog = n;
    go();
    k = VEC[v0 + 1][0];
    check({cpu.st_val[i_e][0], cpu.st_val[i_e][1]} == VEC[v0][2], $sformatf("core %0d: encryption", g));
    check({cpu.st_val[i_d][0], cpu.st_val[i_d][1]} == VEC[v0][1], $sformatf("core %0d: decryption", g));
    check({cpu.st_val[i_e + 7][0], cpu.st_val[i_e + 7][1]} == VEC[v0 + 1][2], $sformatf("core %0d: 2nd encryption", g));
    check({cpu.st_val[i_d + 7][0], cpu.st_val[i_d + 7][1]} == VEC[v0 + 1][1], $sformatf("core %0d: 2nd decryption", g));
    check(cpu.st_val[i_q][0] == 32'h4000_0000 + 32'(i_bad) * 4 && cpu.st_val[i_q][1] == cp_cpop(OP3_CPOP2, 9'd0),
          $sformatf("core %0d: deferred-trap queue", g));
    check({cpu.st_val[i_k][0], cpu.st_val[i_k][1]} == k, $sformatf("core %0d: trapped load ignored", g));
    check(cpu.exacks == 1, $sformatf("core %0d: one exception acknowledged", g));
    n_hold += cpu.hold_cycles; n_lock += cpu.lock_cycles; n_flush += cpu.flushes; n_exack += cpu.exacks;
    n_double += cpu.st_seen[i_e];
  endtask

  // after a reconnect the region starts from reset
  task automatic run_readback();
    n = 0;
    put(cp_ldst(OP3_STDC, 5'd0));
    put(cp_ldst(OP3_STCSR, 5'd0));
    cpu.nprog = n;
    go();
    check({cpu.st_val[0][0], cpu.st_val[0][1]} == 64'd0 && cpu.st_val[1][0] == 32'd0,
          $sformatf("core %0d: region reset after reconnect", g));
    if ({cpu.st_val[0][0], cpu.st_val[0][1]} == 64'd0) n_reset++;
  endtask

  initial begin
    {checks, failures, n_cpdis, n_hold, n_lock, n_flush, n_exack, n_double, n_reset} = '0;
    start = 1'b0;
    ack = 1'b0;
    forever begin
      wait (cmd != 0);
      case (cmd)
        1: run_disabled();
        2: run_des(arg);
        default: run_readback();
      endcase
      ack = 1'b1;
      wait (cmd == 0);
      ack = 1'b0;
    end
  end
endmodule
