// sg_read: the "read" sub-unit of the filter kernel.
//
// On start it reads len consecutive 32-bit samples from global memory,
// beginning at byte address base_addr, and pushes them, in order, into the
// input FIFO stream that feeds the convolve unit. It runs concurrently with
// convolve and write, so memory reads overlap with the filtering.
//
// The memory port is split in two valid/ready channels: a request channel
// carrying a byte address, and a response channel returning the data in
// request order. Requests are issued back to back (one per cycle while
// rd_req_ready is high) and at most MAX_OUTSTANDING of them wait for their
// data at any time. A response is accepted only when the output stream can
// take it (rd_rsp_ready follows m_ready), so backpressure from a full FIFO
// reaches the memory rather than losing data. The channel split, the limit on
// outstanding reads and the one-word-per-request format are this design's
// choices; the original only says that the unit reads memory through the
// kernel's interface port and stores the values in a FIFO stream.
//
// Timing: start is sampled while idle; busy rises on the next edge and falls
// on the edge that accepts the last response, when done pulses for one cycle.
// A start with len = 0 pulses done one cycle later without touching memory.
module sg_read
  import sg_pkg::*;
#(
  parameter int unsigned MAX_OUTSTANDING = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // control
  input  logic    start,
  input  addr_t   base_addr,
  input  len_t    len,
  output logic    busy,
  output logic    done,
  // memory read request
  output logic    rd_req_valid,
  input  logic    rd_req_ready,
  output addr_t   rd_req_addr,
  // memory read response
  input  logic    rd_rsp_valid,
  output logic    rd_rsp_ready,
  input  sample_t rd_rsp_data,
  // output stream to the input FIFO
  output logic    m_valid,
  input  logic    m_ready,
  output sample_t m_data
);

  localparam int unsigned OUT_W = $clog2(MAX_OUTSTANDING + 1);

  len_t            req_left;   // requests still to issue
  len_t            rsp_left;   // responses still to receive
  addr_t           next_addr;
  logic [OUT_W-1:0] outstanding;
  logic            req_fire, rsp_fire;

  assign rd_req_valid = busy && (req_left != '0) && (outstanding != OUT_W'(MAX_OUTSTANDING));
  assign rd_req_addr  = next_addr;
  assign req_fire     = rd_req_valid && rd_req_ready;

  assign m_valid      = busy && rd_rsp_valid;
  assign m_data       = rd_rsp_data;
  assign rd_rsp_ready = busy && m_ready;
  assign rsp_fire     = rd_rsp_valid && rd_rsp_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      req_left    <= '0;
      rsp_left    <= '0;
      next_addr   <= '0;
      outstanding <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          if (len == '0) begin
            done <= 1'b1;
          end else begin
            busy      <= 1'b1;
            req_left  <= len;
            rsp_left  <= len;
            next_addr <= base_addr;
          end
          outstanding <= '0;
        end
      end else begin
        if (req_fire) begin
          req_left  <= req_left - 1'b1;
          next_addr <= next_addr + addr_t'(BYTES_PER_SAMPLE);
        end
        if (rsp_fire) begin
          rsp_left <= rsp_left - 1'b1;
          if (rsp_left == len_t'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
        case ({req_fire, rsp_fire})
          2'b10:   outstanding <= outstanding + 1'b1;
          2'b01:   outstanding <= outstanding - 1'b1;
          default: outstanding <= outstanding;
        endcase
      end
    end
  end

  // A response never arrives for a request that was not issued.
  assert property (@(posedge clk) disable iff (!rst_n) rsp_fire |-> outstanding != '0)
    else $error("sg_read: response without outstanding request");
  // The request stays stable until accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_req_valid && !rd_req_ready |=> rd_req_valid && $stable(rd_req_addr))
    else $error("sg_read: request withdrawn before acceptance");

endmodule
