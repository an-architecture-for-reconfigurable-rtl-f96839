// Behavioural model of the coprocessor side of a Leon3 integer pipeline,
// for testbenches only (not synthesizable intent, not the Leon3 core).
//
// It runs a short program of instructions, written into prog_* by the
// testbench, through the five stages the coprocessor sees (decode, register
// access, execute, memory, exception) and drives the reduced coprocessor
// interface as the processor would:
//  * the whole pipeline freezes while holdn is low (coprocessor stall
//    request or the 'ext_stall' input standing in for cache misses);
//  * with ldlock high, decode and register access stay and a bubble enters
//    execute;
//  * load data of an instruction is driven in its exception stage, store
//    data is sampled at the end of its memory stage;
//  * LDDC, STDC and STDCQ pass through the pipeline twice (cnt 0 and 1);
//  * an instruction marked as trapping, or any coprocessor instruction while
//    'cp_en' is low (cp_disabled trap), raises trap in the exception stage
//    and flushes the pipeline; fetching resumes after it;
//  * a pending coprocessor exception is acknowledged one cycle after it is
//    seen.
// 'done' rises when the program has left the pipeline.
module leon3_cp_model
  import cp_pkg::*;
#(
  parameter int NPROG = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    cp_en,
  input  logic    ext_stall,
  input  cp_out_t cpo,
  output cp_in_t  cpi,
  output logic    done
);

  // program, written by the testbench before 'start'
  logic [31:0] prog_inst  [NPROG];
  logic [31:0] prog_ld    [NPROG][2];
  bit          prog_annul [NPROG];
  bit          prog_trap  [NPROG];
  int          nprog;

  // results
  logic [31:0] st_val   [NPROG][2];
  int          st_seen  [NPROG];
  int          commits  [NPROG];
  int          cycles, hold_cycles, lock_cycles, flushes, cpdis_traps, exacks;
  logic [1:0]  cc_at_commit [NPROG];
  bit          ccv_at_commit[NPROG];

  typedef struct {
    bit         v;
    int         idx;
    logic [1:0] cnt;
  } slot_t;

  slot_t d, a, e, m, x;
  int    fetch_idx;
  logic [1:0] fetch_cnt;
  bit    running;
  logic  exack_q;
  logic  holdn, trap_x;

  function automatic bit is_double(int idx);
    return cp_decode(prog_inst[idx]) inside {CP_LDDC, CP_STDC, CP_STDCQ};
  endfunction

  function automatic cp_stage_t ctl(slot_t s);
    cp_stage_t c;
    c.cnt   = s.cnt;
    c.pv    = s.v;
    c.annul = s.v && prog_annul[s.idx];
    c.trap  = 1'b0;
    return c;
  endfunction

  always_comb begin
    holdn  = cpo.holdn && !ext_stall;
    trap_x = x.v && (prog_trap[x.idx] ||
             (!cp_en && cp_decode(prog_inst[x.idx]) != CP_NONE && !prog_annul[x.idx]));
    cpi.holdn  = holdn;
    cpi.flush  = trap_x;
    cpi.exack  = exack_q;
    cpi.d.pc   = 32'h4000_0000 + 32'(d.idx) * 32'd4;
    cpi.d.inst = d.v ? prog_inst[d.idx] : 32'd0;
    cpi.d.cnt  = d.cnt;
    cpi.d.trap = 1'b0;
    cpi.d.annul = d.v && prog_annul[d.idx];
    cpi.d.pv   = d.v;
    cpi.a      = ctl(a);
    cpi.e      = ctl(e);
    cpi.m      = ctl(m);
    cpi.x      = ctl(x);
    cpi.x.trap = trap_x;
    cpi.lddata = x.v ? prog_ld[x.idx][x.cnt[0]] : 32'd0;
    done       = !running;
  end

  function automatic slot_t fetch();
    slot_t s;
    s.v   = fetch_idx < nprog;
    s.idx = fetch_idx;
    s.cnt = fetch_cnt;
    if (s.v) begin
      if (is_double(fetch_idx) && fetch_cnt == 2'd0) fetch_cnt = 2'd1;
      else begin
        fetch_cnt = 2'd0;
        fetch_idx++;
      end
    end
    return s;
  endfunction

  localparam slot_t EMPTY = '{v: 1'b0, idx: 0, cnt: 2'd0};

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= EMPTY; a <= EMPTY; e <= EMPTY; m <= EMPTY; x <= EMPTY;
      running = 1'b0; exack_q <= 1'b0;
      fetch_idx = 0; fetch_cnt = 2'd0;
      cycles = 0; hold_cycles = 0; lock_cycles = 0; flushes = 0; cpdis_traps = 0; exacks = 0;
    end else begin
      slot_t nd, na, ne, nm, nx;
      nd = d; na = a; ne = e; nm = m; nx = x;
      exack_q <= cpo.exc && !exack_q;
      if (exack_q) exacks++;
      if (start && !running) begin
        running = 1'b1;
        fetch_idx = 0; fetch_cnt = 2'd0;
        cycles = 0; hold_cycles = 0; lock_cycles = 0; flushes = 0; cpdis_traps = 0; exacks = 0;
        for (int i = 0; i < NPROG; i++) begin
          st_seen[i] = 0; commits[i] = 0;
        end
      end else if (running) begin
        cycles++;
        if (!cpo.holdn) hold_cycles++;
        if (holdn) begin
          if (cpo.ldlock) lock_cycles++;
          if (trap_x) begin
            flushes++;
            if (!prog_trap[x.idx]) cpdis_traps++;
            fetch_idx = x.idx + 1; fetch_cnt = 2'd0;
            nd = EMPTY; na = EMPTY; ne = EMPTY; nm = EMPTY; nx = EMPTY;
          end else begin
            if (x.v && !prog_annul[x.idx]) begin
              commits[x.idx]++;
              cc_at_commit[x.idx]  = cpo.cc;
              ccv_at_commit[x.idx] = cpo.ccv;
            end
            if (m.v && !prog_annul[m.idx] && cp_is_store(cp_decode(prog_inst[m.idx]))) begin
              st_val[m.idx][m.cnt[0]] = cpo.stdata;
              st_seen[m.idx]++;
            end
            nx = m;
            nm = e;
            if (cpo.ldlock) ne = EMPTY;
            else begin
              ne = a;
              na = d;
              nd = fetch();
            end
          end
          if (!nd.v && !na.v && !ne.v && !nm.v && !nx.v && fetch_idx >= nprog) running = 1'b0;
        end
      end
      // stage state changes with nonblocking assignments, like the real pipeline registers
      d <= nd; a <= na; e <= ne; m <= nm; x <= nx;
    end
  end

endmodule
