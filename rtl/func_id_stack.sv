// func_id_stack: the function ID stack of the hot function detector.
//
// On a call the ID of the calling function is pushed; on a return the top
// entry is popped and becomes the current function ID again. The stack is a
// DEPTH-entry circular buffer with a write pointer and an occupancy count.
// Pushing onto a full stack overwrites the oldest entry, so deep recursion
// loses only the outermost callers; popping an empty stack changes nothing
// and reports top_valid = 0. A push and a pop in the same cycle replace the
// top entry. The overflow and underflow rules and the depth are this
// design's choices.
//
// Timing: push/pop take effect at the clock edge; top, top_valid and depth
// are read from registers and describe the state before that edge.
module func_id_stack #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = cdr_pkg::FID_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_id,
  input  logic                       pop,
  output logic [W-1:0]               top,
  output logic                       top_valid,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic                       overflow   // pulse: a push lost the oldest entry
);

  localparam int unsigned PW = $clog2(DEPTH);
  typedef logic [$clog2(DEPTH+1)-1:0] depth_t;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp;          // next free slot
  logic [PW-1:0] tp;          // slot of the top entry

  assign tp        = wp - PW'(1);
  assign top_valid = (depth != '0);
  assign top       = top_valid ? mem[tp] : '0;
  assign overflow  = push && !pop && (depth == depth_t'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      depth <= '0;
    end else if (push && pop && top_valid) begin
      // replace top: pointers unchanged
    end else if (push) begin
      wp <= wp + PW'(1);
      if (depth != depth_t'(DEPTH)) depth <= depth + depth_t'(1);
    end else if (pop && top_valid) begin
      wp    <= tp;
      depth <= depth - depth_t'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (push && pop && top_valid) mem[tp] <= push_id;
    else if (push)                mem[wp] <= push_id;
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("func_id_stack: DEPTH must be a power of two");
  end

endmodule
