// cdr_pkg: types and constants shared by the compiler-directed resizing
// hardware (fetch throttle and hot function detector).
//
// Instruction words follow the 64-bit PISA layout used by the SimpleScalar
// family of simulators: word A holds a 16-bit annotation field in its upper
// half and the 8-bit opcode in its low byte; word B holds rs/rt/rd/shamt or
// rs/rt/imm16. The opcode given to the new maxcnt instruction, the counter
// width of an info block and the function ID granularity are this design's
// own choices; the set of info block counters is the one the profiler
// defines (cycles, correct and mispredicted branches, data and instruction
// cache hits and misses, number of calls).
package cdr_pkg;

  // Program counter width of the PISA target.
  localparam int unsigned PC_W    = 32;
  // PISA instructions are 8 bytes long, so the low 3 PC bits are always 0
  // and are dropped from the function identifier.
  localparam int unsigned FID_LSB = 3;
  localparam int unsigned FID_W   = PC_W - FID_LSB;

  // Width of every event counter in an info block. Must be at least the
  // refresh timer width so that the cycles counter can reach the hot bit.
  localparam int unsigned CNT_W   = 20;

  // Opcode (word A, bits 7:0) given to the maxcnt instruction. Its 16-bit
  // immediate (word B, bits 15:0) is the new MAXCOUNT value.
  localparam logic [7:0] MAXCNT_OPCODE = 8'hF0;

  typedef logic [PC_W-1:0]  pc_t;
  typedef logic [FID_W-1:0] func_id_t;
  typedef logic [CNT_W-1:0] cnt_t;

  // One 64-bit PISA instruction.
  typedef struct packed {
    logic [31:0] a;   // [31:16] annotation, [7:0] opcode
    logic [31:0] b;   // [31:24] rs, [23:16] rt, [15:0] immediate
  } pisa_inst_t;

  // Counters of one info block (the tag is held beside it).
  typedef struct packed {
    cnt_t cycles;
    cnt_t br_correct;
    cnt_t br_mispred;
    cnt_t dc_miss;
    cnt_t dc_hit;
    cnt_t ic_miss;
    cnt_t ic_hit;
    cnt_t num_calls;
  } info_cnt_t;

  // Per-cycle profiling events from the core. One of each kind at most.
  typedef struct packed {
    logic br_correct;   // a correctly predicted branch committed
    logic br_mispred;   // a mispredicted branch committed
    logic dc_miss;      // data cache miss
    logic dc_hit;       // data cache hit
    logic ic_miss;      // instruction cache miss
    logic ic_hit;       // instruction cache hit
  } prof_events_t;

  // Function ID of a program counter.
  function automatic func_id_t pc_to_fid(pc_t pc);
    return pc[PC_W-1:FID_LSB];
  endfunction

  // Counter increment that sticks at all ones instead of wrapping.
  function automatic cnt_t sat_inc(cnt_t v, logic en);
    return (en && v != '1) ? v + cnt_t'(1) : v;
  endfunction

  // True when an opcode byte (word A, bits 7:0) is that of maxcnt.
  function automatic logic is_maxcnt(logic [7:0] opcode);
    return opcode == MAXCNT_OPCODE;
  endfunction

endpackage
