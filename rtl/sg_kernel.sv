// sg_kernel: Savitzky-Golay smoothing filter kernel for one time series.
//
// The kernel smooths a series of n_samples 32-bit samples held in global
// memory at src_addr with a W-tap FIR filter whose coefficients (coef) are
// the Savitzky-Golay coefficients for the chosen window and polynomial order,
// and writes the n_samples-W+1 results to dst_addr. Which filter it applies
// depends only on the coefficient values, which the host computes and hands
// over with the start command; W is fixed when the kernel is built.
//
// It is a dataflow pipeline of three sub-units that all run at once:
//
//   memory --> sg_read --> FIFO(2) --> sg_convolve --> FIFO(2) --> sg_write --> memory
//
// read fetches the input samples, convolve keeps the latest W of them in a
// shift array and produces one filtered sample per window, write stores the
// results. The two FIFO streams, two entries deep, decouple the three units
// so that reads, arithmetic and writes overlap; in steady state one sample
// passes through per clock cycle, and any unit that stalls (slow memory, an
// empty or full FIFO) holds back only its neighbours through the FIFOs.
// This structure follows the original kernel. The control handshake below,
// the memory port protocol and the number formats are this design's choices.
//
// Control: while idle, a start pulse latches the arguments and starts all
// three sub-units in the same cycle; busy then stays high until all three
// have finished, and done pulses for one cycle as busy falls. Start is
// ignored while busy. To process several series (several assets), start the
// kernel once per series.
//
// Memory ports: a read request channel (byte address), a read response
// channel returning data in request order, and a write channel (address and
// data), all valid/ready. Addresses advance by 4 bytes per sample.
module sg_kernel
  import sg_pkg::*;
#(
  parameter int unsigned W               = WINDOW_DEFAULT,
  parameter int unsigned FIFO_DEPTH      = 2,
  parameter int unsigned MAX_OUTSTANDING = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // control
  input  logic    start,
  input  addr_t   src_addr,
  input  addr_t   dst_addr,
  input  len_t    n_samples,
  input  coef_t   coef [W],
  output logic    busy,
  output logic    done,
  // global memory: read request
  output logic    rd_req_valid,
  input  logic    rd_req_ready,
  output addr_t   rd_req_addr,
  // global memory: read response
  input  logic    rd_rsp_valid,
  output logic    rd_rsp_ready,
  input  sample_t rd_rsp_data,
  // global memory: write
  output logic    wr_valid,
  input  logic    wr_ready,
  output addr_t   wr_addr,
  output sample_t wr_data
);

  localparam int unsigned LVL_W = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_t;
  state_t state;

  logic go;
  len_t n_out;
  logic rd_done, cv_done, wr_done;
  logic rd_busy, cv_busy, wr_busy;
  logic rd_fin, cv_fin, wr_fin;     // sub-unit finished in this run

  assign go    = (state == S_IDLE) && start;
  assign n_out = (n_samples >= len_t'(W)) ? n_samples - len_t'(W) + 1'b1 : '0;
  assign busy  = (state == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      rd_fin <= 1'b0;
      cv_fin <= 1'b0;
      wr_fin <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state  <= S_RUN;
            rd_fin <= 1'b0;
            cv_fin <= 1'b0;
            wr_fin <= 1'b0;
          end
        end
        S_RUN: begin
          if (rd_done) rd_fin <= 1'b1;
          if (cv_done) cv_fin <= 1'b1;
          if (wr_done) wr_fin <= 1'b1;
          if ((rd_fin || rd_done) && (cv_fin || cv_done) && (wr_fin || wr_done)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // read -> input FIFO
  logic    rd_m_valid, rd_m_ready;
  sample_t rd_m_data;
  // input FIFO -> convolve
  logic    cv_s_valid, cv_s_ready;
  sample_t cv_s_data;
  // convolve -> output FIFO
  logic    cv_m_valid, cv_m_ready;
  sample_t cv_m_data;
  // output FIFO -> write
  logic    wr_s_valid, wr_s_ready;
  sample_t wr_s_data;
  logic [LVL_W-1:0] in_level, out_level;

  sg_read #(.MAX_OUTSTANDING(MAX_OUTSTANDING)) u_read (
    .clk, .rst_n,
    .start(go), .base_addr(src_addr), .len(n_samples),
    .busy(rd_busy), .done(rd_done),
    .rd_req_valid, .rd_req_ready, .rd_req_addr,
    .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
    .m_valid(rd_m_valid), .m_ready(rd_m_ready), .m_data(rd_m_data)
  );

  sg_stream_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .s_valid(rd_m_valid), .s_ready(rd_m_ready), .s_data(rd_m_data),
    .m_valid(cv_s_valid), .m_ready(cv_s_ready), .m_data(cv_s_data),
    .level(in_level)
  );

  sg_convolve #(.W(W)) u_convolve (
    .clk, .rst_n,
    .start(go), .len(n_samples), .coef,
    .busy(cv_busy), .done(cv_done),
    .s_valid(cv_s_valid), .s_ready(cv_s_ready), .s_data(cv_s_data),
    .m_valid(cv_m_valid), .m_ready(cv_m_ready), .m_data(cv_m_data)
  );

  sg_stream_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .s_valid(cv_m_valid), .s_ready(cv_m_ready), .s_data(cv_m_data),
    .m_valid(wr_s_valid), .m_ready(wr_s_ready), .m_data(wr_s_data),
    .level(out_level)
  );

  sg_write u_write (
    .clk, .rst_n,
    .start(go), .base_addr(dst_addr), .count(n_out),
    .busy(wr_busy), .done(wr_done),
    .s_valid(wr_s_valid), .s_ready(wr_s_ready), .s_data(wr_s_data),
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  // While idle none of the sub-units is working.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_IDLE |-> !rd_busy && !cv_busy && !wr_busy)
    else $error("sg_kernel: sub-unit busy while kernel idle");

endmodule
