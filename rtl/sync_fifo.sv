// sync_fifo: small synchronous first-in first-out buffer. It implements the
// PSum Router ring buffers (6 entries for each incoming ring link, 4 for the
// multiplier input, 6 towards the DMAccum) and the DMAccum overflow buffer.
//
// Push and pop happen on the rising clock edge; the head is visible
// combinationally (first-word fall-through). 'free' gives the number of
// empty entries so that a sender can apply the two-free-entries rule for
// injecting new traffic into the ring. Pushing when full or popping when
// empty is a protocol error and is flagged by assertions.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  T                         din,
  input  logic                     pop,
  output T                         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  T              mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;

  assign dout  = mem[rd_ptr];
  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));
  assign free  = CW'(DEPTH) - count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) begin
        rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
