// sg_mem_model: behavioural model of the accelerator card's global memory,
// for testbenches only (not synthesizable).
//
// It serves the filter kernel's three memory channels: read requests (byte
// address), read responses (returned in request order after a random
// latency of LAT_MIN..LAT_MAX cycles) and writes (address and data). Each
// cycle the model lowers rd_req_ready, wr_ready and its readiness to present
// a response at random, with probability STALL_PCT percent, so the kernel
// sees a memory that sometimes stalls. STALL_PCT = 0 and LAT_MIN = LAT_MAX
// give an ideal memory with a fixed latency; stall_pct, lat_min and lat_max
// can be changed at run time. The storage is WORDS 32-bit
// words starting at byte address 0; testbenches load and inspect it through
// the array words. Counters report the traffic and the stalls it caused.
module sg_mem_model #(
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned LAT_MIN   = 2,
  parameter int unsigned LAT_MAX   = 8,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_req_valid,
  output logic        rd_req_ready,
  input  logic [63:0] rd_req_addr,
  output logic        rd_rsp_valid,
  input  logic        rd_rsp_ready,
  output logic [31:0] rd_rsp_data,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [63:0] wr_addr,
  input  logic [31:0] wr_data
);

  typedef struct {
    logic [31:0] data;
    longint      due;
  } rsp_t;

  logic [31:0] words [WORDS];
  rsp_t        pending [$];
  longint      cycle = 0;
  logic        hold_rsp = 1'b0;   // response withheld this cycle

  int reads = 0, writes = 0, bad_addr = 0;
  int req_stalls = 0, wr_stalls = 0, rsp_backpressure = 0;
  int max_pending = 0;

  // stall probability, may be changed by a testbench while running
  int unsigned stall_pct = STALL_PCT;
  // latency range, may likewise be changed at run time
  int unsigned lat_min = LAT_MIN, lat_max = LAT_MAX;

  function automatic bit stall();
    return (stall_pct != 0) && ($urandom_range(0, 99) < stall_pct);
  endfunction

  initial begin
    rd_req_ready = 1'b0;
    rd_rsp_valid = 1'b0;
    rd_rsp_data  = '0;
    wr_ready     = 1'b0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      pending.delete();
      rd_req_ready <= 1'b0;
      rd_rsp_valid <= 1'b0;
      wr_ready     <= 1'b0;
    end else begin
      // what happened on this edge, from the values before it
      if (rd_req_valid && !rd_req_ready) req_stalls++;
      if (wr_valid && !wr_ready) wr_stalls++;
      if (rd_rsp_valid && !rd_rsp_ready) rsp_backpressure++;
      if (rd_rsp_valid && rd_rsp_ready) void'(pending.pop_front());
      if (rd_req_valid && rd_req_ready) begin
        automatic rsp_t r;
        automatic longint idx = longint'(rd_req_addr >> 2);
        if (rd_req_addr[1:0] != 2'b00 || idx >= longint'(WORDS)) begin
          bad_addr++;
          r.data = 32'hDEAD_BEEF;
        end else begin
          r.data = words[idx[$clog2(WORDS)-1:0]];
        end
        r.due = cycle + longint'($urandom_range(lat_min, lat_max));
        pending.push_back(r);
        reads++;
      end
      if (wr_valid && wr_ready) begin
        automatic longint idx = longint'(wr_addr >> 2);
        if (wr_addr[1:0] != 2'b00 || idx >= longint'(WORDS)) bad_addr++;
        else words[idx[$clog2(WORDS)-1:0]] = wr_data;
        writes++;
      end
      if (pending.size() > max_pending) max_pending = pending.size();
      cycle++;
      // outputs for the next cycle; a response once shown stays until taken
      rd_req_ready <= !stall();
      wr_ready     <= !stall();
      if (rd_rsp_valid && !rd_rsp_ready) begin
        rd_rsp_valid <= 1'b1;
      end else if (pending.size() != 0 && pending[0].due <= cycle && !stall()) begin
        rd_rsp_valid <= 1'b1;
        rd_rsp_data  <= pending[0].data;
      end else begin
        rd_rsp_valid <= 1'b0;
      end
    end
  end

endmodule
