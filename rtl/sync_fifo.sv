// sync_fifo: single-clock FIFO with valid/ready handshakes on both sides.
//
// Used for every queue and buffer of the memory controller: request queue,
// transaction queue, command queue, write queue, read buffer, in-flight read
// list and data (response) buffer. The element type T and the depth are
// parameters. Storage is a circular array with read and write pointers and an
// occupancy count; a push and a pop may happen in the same cycle, also when
// the FIFO is full. out_data shows the head combinationally (first-word
// fall-through), so a pushed element can be popped on the next cycle.
//
// Ports: in_valid/in_ready/in_data (push side), out_valid/out_ready/out_data
// (pop side), count (current occupancy).
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  T                       in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output T                       out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  T                mem [DEPTH];
  logic [PW-1:0]   wptr, rptr;
  logic            push, pop;

  assign in_ready  = (count != CW'(DEPTH)) || out_ready;
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= next_ptr(wptr);
      if (pop)  rptr <= next_ptr(rptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= CW'(DEPTH));

endmodule
