// fetch_throttle: limits the number of instructions in the processor to a
// compiler-chosen MAXCOUNT by gating instruction fetch.
//
// The MAXCOUNT register is written by the maxcnt instruction (maxcnt_we /
// maxcnt_val, from decode). An instr_counter tracks the instructions in the
// machine. The compare raises fetch_gate while count >= MAXCOUNT, which stops
// fetch until commits bring the count below the limit again. These three
// parts and the ">=" rule follow the fetch-throttling figure of the design.
//
// Design choices: after reset MAXCOUNT is all ones, which leaves the whole
// machine in use; a maxcnt value of 0, which would stop fetch for ever, is
// stored as 1; a value wider than COUNT_W is clamped to all ones. fetch_gate
// is combinational from the two registers, so a write takes effect in the
// cycle after the maxcnt instruction is decoded. The fetch unit must fetch
// nothing while fetch_gate is high (asserted below).
module fetch_throttle #(
  parameter int unsigned COUNT_W  = 8,
  parameter int unsigned FETCH_W  = 4,
  parameter int unsigned COMMIT_W = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           maxcnt_we,
  input  logic [15:0]                    maxcnt_val,
  input  logic [$clog2(FETCH_W+1)-1:0]   fetch_n,
  input  logic [$clog2(COMMIT_W+1)-1:0]  commit_n,
  input  logic [COUNT_W-1:0]             squash_n,
  output logic                           fetch_gate,
  output logic [COUNT_W-1:0]             count,
  output logic [COUNT_W-1:0]             maxcount
);

  logic [COUNT_W-1:0] wr_val;

  instr_counter #(
    .COUNT_W (COUNT_W),
    .FETCH_W (FETCH_W),
    .COMMIT_W(COMMIT_W)
  ) u_count (
    .clk     (clk),
    .rst_n   (rst_n),
    .fetch_n (fetch_n),
    .commit_n(commit_n),
    .squash_n(squash_n),
    .count   (count)
  );

  always_comb begin
    if (32'(maxcnt_val) > 32'((1 << COUNT_W) - 1)) wr_val = '1;
    else if (maxcnt_val == 16'd0)                  wr_val = COUNT_W'(1);
    else                                           wr_val = maxcnt_val[COUNT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         maxcount <= '1;
    else if (maxcnt_we) maxcount <= wr_val;
  end

  assign fetch_gate = (count >= maxcount);

  a_no_fetch_when_gated: assert property (@(posedge clk) disable iff (!rst_n)
    fetch_gate |-> fetch_n == '0)
    else $error("fetch_throttle: instructions fetched while fetch is gated");

endmodule
