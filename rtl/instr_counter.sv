// instr_counter: number of instructions currently in the processor.
//
// The count rises by the number of instructions fetched in a cycle and falls
// by the number committed, as in the instruction-count box of the fetch
// throttle. Instructions squashed after a misprediction leave the machine
// without committing, so a squash count also lowers it; that input is this
// design's addition, needed to keep the count exact. All three changes of a
// cycle are applied together at the clock edge; the result is clamped to the
// range 0 .. 2**COUNT_W-1 (an assertion flags a removal of more instructions
// than are counted, which a correct core never requests).
//
// Ports: fetch_n (0..FETCH_W), commit_n (0..COMMIT_W), squash_n (any
// number up to the count), count (registered).
module instr_counter #(
  parameter int unsigned COUNT_W  = 8,
  parameter int unsigned FETCH_W  = 4,
  parameter int unsigned COMMIT_W = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [$clog2(FETCH_W+1)-1:0]   fetch_n,
  input  logic [$clog2(COMMIT_W+1)-1:0]  commit_n,
  input  logic [COUNT_W-1:0]             squash_n,
  output logic [COUNT_W-1:0]             count
);

  localparam logic [COUNT_W+1:0] CNT_MAX = {2'b00, {COUNT_W{1'b1}}};

  logic [COUNT_W+1:0] up, down, diff;
  logic [COUNT_W-1:0] nxt;

  always_comb begin
    up   = {2'b00, count} + (COUNT_W+2)'(fetch_n);
    down = (COUNT_W+2)'(commit_n) + (COUNT_W+2)'(squash_n);
    diff = up - down;
    if (down > up)          nxt = '0;
    else if (diff > CNT_MAX) nxt = '1;
    else                    nxt = diff[COUNT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= nxt;
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    down <= up)
    else $error("instr_counter: more instructions removed than counted");

endmodule
