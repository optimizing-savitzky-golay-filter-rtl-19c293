// sg_stream_fifo: the FIFO stream that links two sub-units of the filter
// kernel (read -> convolve and convolve -> write).
//
// A small first-in-first-out buffer of DEPTH entries, two by default as in the
// original kernel, so that the producer can run one element ahead of the
// consumer and neither has to stall on a single-cycle hiccup of the other.
// Entries live in a register array addressed by a write and a read pointer;
// an occupancy counter gives full and empty.
//
// Interface: valid/ready streams on both sides. An element is pushed when
// s_valid && s_ready and popped when m_valid && m_ready, both on the rising
// clock edge. s_ready is high while the FIFO is not full, m_valid while it is
// not empty. There is no bypass: a pushed element can be popped one cycle
// later at the earliest. Push and pop may happen in the same cycle. s_ready
// depends only on the occupancy, so a full FIFO refuses a push even in a
// cycle where it is popped (no combinational path from m_ready to s_ready).
// Reset (active-low, synchronous) empties the FIFO.
module sg_stream_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [WIDTH-1:0] s_data,
  // read side
  output logic             m_valid,
  input  logic             m_ready,
  output logic [WIDTH-1:0] m_data,
  // occupancy, for observation
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] count;
  logic             push, pop;

  assign s_ready = (count != CNT_W'(DEPTH));
  assign m_valid = (count != '0);
  assign m_data  = mem[rd_ptr];
  assign level   = count;
  assign push    = s_valid && s_ready;
  assign pop     = m_valid && m_ready;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= s_data;
  end

  // The occupancy never leaves 0..DEPTH.
  assert property (@(posedge clk) disable iff (!rst_n) count <= CNT_W'(DEPTH))
    else $error("sg_stream_fifo: occupancy above depth");

endmodule
