// sg_write: the "write" sub-unit of the filter kernel.
//
// On start it takes count filtered samples from the output FIFO stream and
// writes them to consecutive 32-bit words of global memory, beginning at byte
// address base_addr. It runs concurrently with read and convolve.
//
// The memory write port is one valid/ready channel carrying address and data
// together; a sample is popped from the stream in the same cycle the memory
// accepts its write, so a slow memory stalls the stream and, through the
// FIFO, the convolve unit. The single-beat write channel without write
// responses is this design's choice; the original only says that the unit
// writes the FIFO's elements to global memory.
//
// Timing: start is sampled while idle; busy rises on the next edge and falls
// on the edge that issues the last write, when done pulses for one cycle.
// A start with count = 0 pulses done one cycle later.
module sg_write
  import sg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // control
  input  logic    start,
  input  addr_t   base_addr,
  input  len_t    count,
  output logic    busy,
  output logic    done,
  // input stream (from the output FIFO)
  input  logic    s_valid,
  output logic    s_ready,
  input  sample_t s_data,
  // memory write
  output logic    wr_valid,
  input  logic    wr_ready,
  output addr_t   wr_addr,
  output sample_t wr_data
);

  len_t  left;
  addr_t next_addr;
  logic  fire;

  assign wr_valid = busy && s_valid;
  assign wr_addr  = next_addr;
  assign wr_data  = s_data;
  assign s_ready  = busy && wr_ready;
  assign fire     = wr_valid && wr_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      left      <= '0;
      next_addr <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          if (count == '0) begin
            done <= 1'b1;
          end else begin
            busy      <= 1'b1;
            left      <= count;
            next_addr <= base_addr;
          end
        end
      end else if (fire) begin
        left      <= left - 1'b1;
        next_addr <= next_addr + addr_t'(BYTES_PER_SAMPLE);
        if (left == len_t'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A write stays stable until the memory accepts it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data))
    else $error("sg_write: write withdrawn before acceptance");

endmodule
