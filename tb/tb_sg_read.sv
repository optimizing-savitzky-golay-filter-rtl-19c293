// tb_sg_read: self-checking testbench of the read sub-unit.
//
// The unit reads from the global-memory model into a consumer that stalls
// at random. Three series are read: one with a stalling memory, one of length
// zero, and one from an ideal memory into a consumer that never stalls. The
// testbench checks every sample and its order against the memory contents,
// the number of samples, the done pulse, that no address falls outside the
// series, that no more than MAX_OUTSTANDING reads wait at once, and, for the
// ideal run, that one sample per cycle arrives (len + latency + a few cycles).
module tb_sg_read;
  import sg_pkg::*;

  localparam int unsigned MAXO  = 4;
  localparam int unsigned WORDS = 4096;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic    start, busy, done;
  addr_t   base_addr;
  len_t    len;
  logic    rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready;
  addr_t   rd_req_addr;
  sample_t rd_rsp_data;
  logic    m_valid, m_ready;
  sample_t m_data;
  logic    wr_valid = 1'b0, wr_ready;
  addr_t   wr_addr = '0;
  sample_t wr_data = '0;

  sg_read #(.MAX_OUTSTANDING(MAXO)) dut (.*);
  sg_mem_model #(.WORDS(WORDS), .LAT_MIN(2), .LAT_MAX(12), .STALL_PCT(25)) mem (
    .clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req_addr,
    .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  int checks = 0, failures = 0;
  int got = 0, exp_base = 0, done_cnt = 0, consumer_stall_pct = 40;
  int addr_lo = 0, addr_hi = 0;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  always_ff @(negedge clk)
    m_ready <= (consumer_stall_pct == 0) || ($urandom_range(0, 99) >= consumer_stall_pct);

  always @(posedge clk) begin
    if (rst_n) begin
      if (m_valid && m_ready) begin
        check(m_data == mem.words[exp_base + got],
              $sformatf("sample %0d: %h, expected %h", got, m_data, mem.words[exp_base + got]));
        got++;
      end
      if (rd_req_valid && rd_req_ready)
        check(int'(rd_req_addr) >= addr_lo && int'(rd_req_addr) < addr_hi,
              $sformatf("address %h inside the series", rd_req_addr));
      if (done) done_cnt++;
    end
  end

  task automatic run(input int base_word, input int n, input int stall, output int cycles);
    exp_base = base_word;
    got = 0;
    done_cnt = 0;
    addr_lo = base_word * 4;
    addr_hi = (base_word + n) * 4;
    mem.stall_pct = stall;
    consumer_stall_pct = stall == 0 ? 0 : 40;
    @(negedge clk);
    start = 1'b1;
    base_addr = addr_t'(base_word * 4);
    len = len_t'(n);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    check(got == n, $sformatf("sample count %0d of %0d", got, n));
    check(done_cnt == 1, "one done pulse");
    check(!busy, "idle after done");
  endtask

  int cyc;
  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    base_addr = '0;
    len = '0;
    for (int i = 0; i < int'(WORDS); i++) mem.words[i] = $urandom;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    run(100, 1000, 25, cyc);
    check(mem.max_pending <= int'(MAXO), "outstanding reads limited");
    check(mem.req_stalls > 0 && mem.rsp_backpressure > 0, "stalls exercised");
    run(7, 0, 25, cyc);
    check(cyc <= 3, "empty series finishes at once");
    mem.lat_min = 2;
    mem.lat_max = 2;
    run(2000, 1500, 0, cyc);
    // fixed latency below MAX_OUTSTANDING: one sample per cycle
    check(cyc <= 1500 + 6, $sformatf("ideal run took %0d cycles", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
