// Self-checking testbench of cp_pipe, driven by the Leon3 pipeline model,
// with a stand-in core: the store word of a store in execute is its address
// XOR its pass number, and the interlock and stall requests are random.
// Checks that exactly the live coprocessor instructions commit, once per
// pass and in program order, with the right load data and pass number;
// that each store pass delivers its own word in the memory stage; and that
// annulled, trapped and non-coprocessor instructions never commit.
module tb_cp_pipe;
  import cp_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge for the asynchronous resets
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  cp_in_t  cpi;
  cp_out_t cpo;
  logic    start, done, ext_stall;
  cp_stage_info_t a_info, e_info, m_info, x_info;
  logic        x_fire;
  logic [31:0] x_lddata, st_word;
  logic        lock_req, hold_req;

  cp_pipe dut (.clk, .rst_n, .cpi, .cpo, .a_info, .e_info, .m_info, .x_info, .x_fire, .x_lddata,
               .st_word, .lock_req, .hold_req, .exc(1'b0), .cc(2'b01), .ccv(1'b1));
  leon3_cp_model #(.NPROG(64)) cpu (.clk, .rst_n, .start, .cp_en(1'b1), .ext_stall, .cpo, .cpi, .done);

  assign st_word = (e_info.valid && cp_is_store(e_info.op)) ? (e_info.pc ^ 32'(e_info.cnt)) : 32'd0;

  typedef struct packed {
    logic [31:0] pc;
    logic [1:0]  cnt;
    logic [31:0] ld;
  } commit_t;
  commit_t exp_q[$], got_q[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (x_fire) got_q.push_back('{x_info.pc, x_info.cnt, cp_is_load(x_info.op) ? x_lddata : 32'd0});

  int n, seed_lock;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] kinds [8];
    int nlock, nhold;
    kinds = '{cp_ldst(OP3_LDC, 5'd3), cp_ldst(OP3_LDDC, 5'd4), cp_ldst(OP3_STC, 5'd1),
              cp_ldst(OP3_STDC, 5'd2), cp_cpop(OP3_CPOP1, 9'd7), cp_cpop(OP3_CPOP2, 9'd9),
              32'h0100_0000, cp_ldst(OP3_STCSR, 5'd0)};
    start = 0; ext_stall = 0; lock_req = 0; hold_req = 0;
    for (int round = 0; round < 4; round++) begin
      n = 48;
      exp_q.delete(); got_q.delete();
      for (int i = 0; i < n; i++) begin
        logic [31:0] in;
        bit an, tr;
        in = kinds[$urandom % 8];
        an = ($urandom % 8) == 0;
        tr = !an && ($urandom % 12) == 0;
        cpu.prog_inst[i] = in; cpu.prog_annul[i] = an; cpu.prog_trap[i] = tr;
        cpu.prog_ld[i][0] = $urandom; cpu.prog_ld[i][1] = $urandom;
        if (!an && !tr && cp_decode(in) != CP_NONE) begin
          bit dbl;
          dbl = cp_decode(in) inside {CP_LDDC, CP_STDC, CP_STDCQ};
          for (int p = 0; p <= int'(dbl); p++)
            exp_q.push_back('{32'h4000_0000 + 32'(i) * 4, 2'(p),
                              cp_is_load(cp_decode(in)) ? cpu.prog_ld[i][p] : 32'd0});
        end
      end
      cpu.nprog = n;
      if (round == 0) rst_n = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1; start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      nlock = 0; nhold = 0;
      while (!done) begin
        @(posedge clk); #1;
        if (round > 0) begin
          lock_req = ($urandom % 4) == 0;
          hold_req = ($urandom % 5) == 0;
          ext_stall = ($urandom % 6) == 0;
          nlock += int'(lock_req); nhold += int'(hold_req);
        end
      end
      lock_req = 0; hold_req = 0; ext_stall = 0;
      check(got_q.size() == exp_q.size(), $sformatf("round %0d: %0d commits, expected %0d", round, got_q.size(), exp_q.size()));
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
        check(got_q[i] == exp_q[i], $sformatf("round %0d commit %0d: got %h expected %h", round, i, got_q[i], exp_q[i]));
      for (int i = 0; i < n; i++) begin
        cp_op_e op;
        op = cp_decode(cpu.prog_inst[i]);
        if (cp_is_store(op) && !cpu.prog_annul[i] && !cpu.prog_trap[i]) begin
          check(cpu.st_val[i][0] == (32'h4000_0000 + 32'(i) * 4), $sformatf("round %0d store %0d word 0", round, i));
          if (op == CP_STDC)
            check(cpu.st_val[i][1] == ((32'h4000_0000 + 32'(i) * 4) ^ 32'd1), $sformatf("round %0d store %0d word 1", round, i));
        end
      end
      if (round > 0) check(cpu.lock_cycles > 0 && cpu.hold_cycles > 0, "interlocks and stalls exercised");
      check(cpu.flushes > 0 || round == 0, "trap flushes exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
