// rsb: return stack buffer.
//
// A DEPTH-entry circular hardware stack of truncated return addresses (in
// the STBPU each entry is stored XOR-encrypted with the caller's phi). A call
// pushes its fall-through address, a return pops. When the stack is full a
// push overwrites the oldest entry (overflow pulses); a pop on an empty stack
// changes nothing and pulses underflow, and the predictor then falls back to
// the BTB for the return. The top entry and `empty` are combinational views
// of the state; push and pop take effect at the clock edge and must not be
// raised together. Reset empties the stack. Depth and entry width (16 x 32
// bits) are the baseline's; the overwrite-on-overflow behaviour is this
// design's choice.
module rsb #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned PTR_W = $clog2(DEPTH),
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [DATA_W-1:0] push_data,
  input  logic              pop,
  output logic              empty,
  output logic [DATA_W-1:0] top,
  output logic              overflow,
  output logic              underflow
);

  logic [DATA_W-1:0] stack [DEPTH];
  logic [PTR_W-1:0]  sp;     // next free slot
  logic [CNT_W-1:0]  count;  // valid entries

  assign empty     = (count == '0);
  assign top       = stack[sp - 1'b1];
  assign overflow  = push && (count == CNT_W'(DEPTH));
  assign underflow = pop && empty;

  always_ff @(posedge clk) begin
    if (push) stack[sp] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp    <= '0;
      count <= '0;
    end else if (push) begin
      sp <= sp + 1'b1;
      if (count != CNT_W'(DEPTH)) count <= count + 1'b1;
    end else if (pop && !empty) begin
      sp    <= sp - 1'b1;
      count <= count - 1'b1;
    end
  end

  a_no_push_pop: assert property (@(posedge clk) !(push && pop));

endmodule
