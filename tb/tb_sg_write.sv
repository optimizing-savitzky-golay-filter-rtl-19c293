// tb_sg_write: self-checking testbench of the write sub-unit.
//
// A producer offers a numbered sequence with random gaps; the global-memory
// model accepts writes with random stalls. After each series the testbench
// checks every written word, that the words just before and after the
// destination are untouched, the done pulse, and for a run without stalls
// that one word is written per cycle. A series of length zero must finish
// at once without writing.
module tb_sg_write;
  import sg_pkg::*;

  localparam int unsigned WORDS = 8192;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic    start, busy, done;
  addr_t   base_addr;
  len_t    count;
  logic    s_valid, s_ready;
  sample_t s_data;
  logic    wr_valid, wr_ready;
  addr_t   wr_addr;
  sample_t wr_data;
  logic    rd_req_ready, rd_rsp_valid;
  sample_t rd_rsp_data;

  sg_write dut (.*);
  sg_mem_model #(.WORDS(WORDS), .STALL_PCT(30)) mem (
    .clk, .rst_n,
    .rd_req_valid(1'b0), .rd_req_ready, .rd_req_addr('0),
    .rd_rsp_valid, .rd_rsp_ready(1'b0), .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic sample_t val(input int i, input int seed);
    return sample_t'(i * 1103515245 + seed);
  endfunction

  // The producer behaves like a FIFO: an offered sample stays until taken.
  int n_in, sent, gap_pct, seed, done_cnt;
  logic taken;
  always @(negedge clk) begin
    if (!s_valid || taken) begin
      s_valid <= rst_n && (sent < n_in) && ($urandom_range(0, 99) >= gap_pct);
      s_data  <= val(sent, seed);
    end
  end
  always @(posedge clk) begin
    taken = s_valid && s_ready;
    if (rst_n) begin
      if (s_valid && s_ready) sent++;
      if (done) done_cnt++;
    end
  end

  task automatic run(input int base_word, input int n, input int stall, output int cycles);
    n_in = n; sent = 0; done_cnt = 0; seed = $urandom;
    gap_pct = stall;
    mem.stall_pct = stall;
    @(negedge clk);
    start = 1'b1;
    base_addr = addr_t'(base_word * 4);
    count = len_t'(n);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    check(done_cnt == 1, "one done pulse");
    check(!busy, "idle after done");
    check(sent == n, "all samples taken");
    for (int i = 0; i < n; i++)
      check(mem.words[base_word + i] == val(i, seed), $sformatf("word %0d", i));
    check(mem.words[base_word - 1] == 32'h5A5A_5A5A, "word before untouched");
    check(mem.words[base_word + n] == 32'h5A5A_5A5A, "word after untouched");
  endtask

  int cyc;
  initial begin
    rst_n = 1'b0; start = 1'b0; base_addr = '0; count = '0;
    n_in = 0; sent = 0; gap_pct = 0; s_valid = 1'b0; taken = 1'b0;
    for (int i = 0; i < int'(WORDS); i++) mem.words[i] = 32'h5A5A_5A5A;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(64, 2000, 30, cyc);
    check(mem.wr_stalls > 0, "memory stalls exercised");
    run(5000, 0, 30, cyc);
    check(cyc <= 3, "empty series finishes at once");
    run(3000, 1500, 0, cyc);
    check(cyc <= 1500 + 4, $sformatf("one write per cycle: %0d cycles", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
