// Types and constants shared by the coprocessor side of the reduced Leon3
// coprocessor interface.
//
// The two interface records carry 162 signals in total (124 towards the
// coprocessor, 38 back), plus clock and reset. The field names, widths and
// their meaning follow the reduced interface records of the design; the
// packed-struct form is this implementation's choice. The instruction
// decoding follows the SPARC V8 coprocessor opcodes (op field in inst[31:30],
// op3 in inst[24:19]). The 9-bit opc field of CPOP instructions is
// inst[13:5], the format suggested for coprocessors.
package cp_pkg;

  // Pipeline control of the decode stage: instruction and its address
  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] inst;
    logic [1:0]  cnt;    // pass number of a multi-cycle instruction
    logic        trap;   // instruction trapped
    logic        annul;  // instruction annulled
    logic        pv;     // stage holds a valid instruction
  } cp_dstage_t;

  // Pipeline control of the register-access, execute, memory and exception stages
  typedef struct packed {
    logic [1:0] cnt;
    logic       trap;
    logic       annul;
    logic       pv;
  } cp_stage_t;

  // Processor -> coprocessor
  typedef struct packed {
    logic        holdn;   // processor pipeline advances when 1
    logic        flush;   // pipeline flush
    logic        exack;   // coprocessor exception acknowledged
    cp_dstage_t  d;
    cp_stage_t   a;
    cp_stage_t   e;
    cp_stage_t   m;
    cp_stage_t   x;
    logic [31:0] lddata;  // load data from memory, valid in the exception stage
  } cp_in_t;

  // Coprocessor -> processor
  typedef struct packed {
    logic [31:0] stdata;  // store data to memory, valid in the memory stage
    logic        exc;     // coprocessor exception pending
    logic [1:0]  cc;      // condition codes for CBccc
    logic        ccv;     // condition codes valid
    logic        ldlock;  // interlock: keep the register-access instruction
    logic        holdn;   // 0 freezes the processor pipeline
  } cp_out_t;

  localparam int CP_IN_BITS  = $bits(cp_in_t);
  localparam int CP_OUT_BITS = $bits(cp_out_t);

  // Value presented to the processor by a disconnected coprocessor
  localparam cp_out_t CP_OUT_IDLE = '{stdata: '0, exc: 1'b0, cc: 2'b00, ccv: 1'b1,
                                      ldlock: 1'b0, holdn: 1'b1};

  // Coprocessor instruction classes (SPARC V8 reserved coprocessor opcodes)
  typedef enum logic [3:0] {
    CP_NONE  = 4'd0,
    CP_LDC   = 4'd1,
    CP_LDDC  = 4'd2,
    CP_LDCSR = 4'd3,
    CP_STC   = 4'd4,
    CP_STDC  = 4'd5,
    CP_STCSR = 4'd6,
    CP_STDCQ = 4'd7,
    CP_CPOP1 = 4'd8,
    CP_CPOP2 = 4'd9,
    CP_CB    = 4'd10
  } cp_op_e;

  // op3 values of the coprocessor loads and stores (op = 2'b11)
  localparam logic [5:0] OP3_LDC   = 6'b110000;
  localparam logic [5:0] OP3_LDCSR = 6'b110001;
  localparam logic [5:0] OP3_LDDC  = 6'b110011;
  localparam logic [5:0] OP3_STC   = 6'b110100;
  localparam logic [5:0] OP3_STCSR = 6'b110101;
  localparam logic [5:0] OP3_STDCQ = 6'b110110;
  localparam logic [5:0] OP3_STDC  = 6'b110111;
  // op3 values of the coprocessor operate instructions (op = 2'b10)
  localparam logic [5:0] OP3_CPOP1 = 6'b110110;
  localparam logic [5:0] OP3_CPOP2 = 6'b110111;
  // op2 of the coprocessor branch (op = 2'b00)
  localparam logic [2:0] OP2_CB    = 3'b111;

  function automatic cp_op_e cp_decode(logic [31:0] inst);
    cp_op_e r;
    r = CP_NONE;
    unique case (inst[31:30])
      2'b11: begin
        unique case (inst[24:19])
          OP3_LDC:   r = CP_LDC;
          OP3_LDCSR: r = CP_LDCSR;
          OP3_LDDC:  r = CP_LDDC;
          OP3_STC:   r = CP_STC;
          OP3_STCSR: r = CP_STCSR;
          OP3_STDCQ: r = CP_STDCQ;
          OP3_STDC:  r = CP_STDC;
          default:   r = CP_NONE;
        endcase
      end
      2'b10: begin
        if (inst[24:19] == OP3_CPOP1)      r = CP_CPOP1;
        else if (inst[24:19] == OP3_CPOP2) r = CP_CPOP2;
      end
      2'b00:   if (inst[24:22] == OP2_CB) r = CP_CB;
      default: r = CP_NONE;
    endcase
    return r;
  endfunction

  function automatic logic cp_is_load(cp_op_e op);
    return op inside {CP_LDC, CP_LDDC, CP_LDCSR};
  endfunction

  function automatic logic cp_is_store(cp_op_e op);
    return op inside {CP_STC, CP_STDC, CP_STCSR, CP_STDCQ};
  endfunction

  function automatic logic cp_is_cpop(cp_op_e op);
    return op inside {CP_CPOP1, CP_CPOP2};
  endfunction

  // Instruction encoders (used by testbenches and software models)
  function automatic logic [31:0] cp_ldst(logic [5:0] op3, logic [4:0] rd);
    return {2'b11, rd, op3, 5'd0, 1'b1, 13'd0};
  endfunction

  function automatic logic [31:0] cp_cpop(logic [5:0] op3, logic [8:0] opc);
    return {2'b10, 5'd0, op3, 5'd0, opc, 5'd0};
  endfunction

  // Decoded view of the instruction held in one coprocessor pipeline stage
  typedef struct packed {
    logic        valid;  // a live coprocessor instruction
    cp_op_e      op;
    logic [4:0]  rd;
    logic [8:0]  opc;
    logic [1:0]  cnt;
    logic [31:0] pc;
    logic [31:0] inst;
  } cp_stage_info_t;

endpackage
