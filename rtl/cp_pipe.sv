// Coprocessor-side pipeline of the reduced Leon3 coprocessor interface.
//
// The coprocessor keeps its own copy of the processor's pipeline: the
// instruction word and its address leave the processor in the decode stage
// and are registered into the coprocessor's register-access, execute,
// memory and exception stages, advancing whenever the processor's 'holdn'
// is high. Validity, annulment, traps and the pass counter of each stage are
// not copied: they are taken every cycle from the processor's per-stage
// control fields, so the coprocessor needs no knowledge of branches or
// traps. 'flush' clears the copied instructions.
//
// Data transfers follow the processor's load/store timing:
//  * store data (STC, STDC, STCSR, STDCQ) is selected by the attached core
//    from the decoded execute-stage instruction and registered at the
//    execute->memory edge, so 'stdata' is valid during the memory stage;
//  * load data ('lddata', LDC, LDDC, LDCSR) arrives in the exception stage
//    and is handed to the core with 'x_fire', to be written at the end of
//    that stage, the write-back edge;
//  * every other side effect (CPOP) also happens on 'x_fire', i.e. when a
//    live instruction leaves the exception stage. Commits are therefore in
//    program order and never undone.
// When the processor's ldlock interlock is raised, the instruction in
// register access stays and a bubble enters execute, as in the processor.
//
// The attached core supplies the store word, the interlock ('lock_req'),
// the stall ('hold_req'), the exception flag and the condition codes; this
// block packs them into the interface record. Which decode-stage pass
// (cnt) carries which word of a double transfer is this design's choice:
// pass 0 moves register rd, pass 1 register rd+1.
module cp_pipe
  import cp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  cp_in_t         cpi,
  output cp_out_t        cpo,
  // decoded view of each stage, for the attached coprocessor core
  output cp_stage_info_t a_info,
  output cp_stage_info_t e_info,
  output cp_stage_info_t m_info,
  output cp_stage_info_t x_info,
  output logic           x_fire,    // x_info commits at this clock edge
  output logic [31:0]    x_lddata,  // load data for x_info
  // from the attached coprocessor core
  input  logic [31:0]    st_word,   // store data for e_info
  input  logic           lock_req,
  input  logic           hold_req,
  input  logic           exc,
  input  logic [1:0]     cc,
  input  logic           ccv
);

  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] inst;
  } slot_t;

  slot_t       a_q, e_q, m_q, x_q;
  logic [31:0] stdata_q;

  function automatic cp_stage_info_t info(slot_t s, cp_stage_t c, logic live);
    cp_stage_info_t r;
    r.op    = cp_decode(s.inst);
    r.valid = live && c.pv && !c.annul && (r.op != CP_NONE) && (r.op != CP_CB);
    r.rd    = s.inst[29:25];
    r.opc   = s.inst[13:5];
    r.cnt   = c.cnt;
    r.pc    = s.pc;
    r.inst  = s.inst;
    return r;
  endfunction

  always_comb begin
    a_info = info(a_q, cpi.a, 1'b1);
    e_info = info(e_q, cpi.e, 1'b1);
    m_info = info(m_q, cpi.m, 1'b1);
    // a trapped instruction never commits
    x_info = info(x_q, cpi.x, !cpi.x.trap);
  end

  assign x_fire   = x_info.valid && cpi.holdn && !cpi.flush;
  assign x_lddata = cpi.lddata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q      <= '0;
      e_q      <= '0;
      m_q      <= '0;
      x_q      <= '0;
      stdata_q <= '0;
    end else if (cpi.flush) begin
      a_q <= '0;
      e_q <= '0;
      m_q <= '0;
      x_q <= '0;
    end else if (cpi.holdn) begin
      x_q      <= m_q;
      m_q      <= e_q;
      stdata_q <= st_word;
      if (lock_req) begin
        e_q <= '0;
      end else begin
        e_q <= a_q;
        a_q <= '{pc: cpi.d.pc, inst: cpi.d.inst};
      end
    end
  end

  always_comb begin
    cpo.stdata = stdata_q;
    cpo.exc    = exc;
    cpo.cc     = cc;
    cpo.ccv    = ccv;
    cpo.ldlock = lock_req;
    cpo.holdn  = !hold_req;
  end

endmodule
