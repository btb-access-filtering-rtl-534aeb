// ras: return address stack.
//
// A call pushes its return address, a return pops the address on top. The
// stack is a circular buffer of DEPTH entries addressed by a top-of-stack
// pointer: pushing onto a full stack overwrites the oldest entry, and popping
// an empty stack wraps around and yields a stale entry (as a real return
// stack does; the prediction is then simply wrong).
//
// Interface: push/push_addr and pop act at the clock edge; top is the entry
// currently on top (combinational), valid when the stack is not empty.
// A push and a pop in the same cycle replace the top entry.
// The depth (32) is the configured one; the circular organisation and the
// overflow behaviour are choices of this RTL. Reset empties the stack.
module ras #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 62
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] push_addr,
  input  logic         pop,
  output logic [W-1:0] top,
  output logic         valid
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [W-1:0]  stack [DEPTH];
  logic [PW-1:0] tos;        // index of the top entry
  logic [PW:0]   count;      // entries held, saturates at DEPTH

  assign top   = stack[tos];
  assign valid = (count != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos   <= '0;
      count <= '0;
    end else if (push && pop) begin
      // net depth unchanged: the top entry is replaced
    end else if (push) begin
      tos   <= tos + 1'b1;
      if (count != (PW+1)'(DEPTH)) count <= count + 1'b1;
    end else if (pop) begin
      tos   <= tos - 1'b1;
      if (count != '0) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && pop) stack[tos]        <= push_addr;
    else if (push)   stack[tos + 1'b1] <= push_addr;
  end

endmodule
