// tb_sg_stream_fifo: self-checking testbench of the depth-2 FIFO stream.
//
// Pushes a numbered sequence with random producer and consumer stalls and
// checks that every element comes out once, in order. It also checks the
// flags: s_ready low exactly when the FIFO holds DEPTH entries, m_valid low
// exactly when it is empty, a full FIFO refusing a push, and that full rate
// (one element per cycle) is reached when neither side stalls.
module tb_sg_stream_fifo;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 2;
  localparam int unsigned N     = 2000;

  logic clk = 1'b0;
  logic rst_n;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [WIDTH-1:0] s_data, m_data;
  logic [$clog2(DEPTH+1)-1:0] level;

  int checks = 0, failures = 0;
  int model_count = 0;
  int sent = 0, got = 0;
  int phase = 0;   // 0: random stalls, 1: no stalls
  int full_seen = 0;
  int cycles_fast = 0;

  always #5 clk = ~clk;

  sg_stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // Drive inputs with random stalls (phase 0) or none (phase 1).
  always_ff @(negedge clk) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      m_ready <= 1'b0;
    end else begin
      s_valid <= (sent < int'(N)) && (phase == 1 || ($urandom_range(0, 99) < 60));
      m_ready <= (phase == 1) || ($urandom_range(0, 99) < 50);
    end
    s_data <= WIDTH'(sent * 32'h9E37_79B9 + 7);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      check(s_ready == (model_count != int'(DEPTH)), "s_ready vs occupancy");
      check(m_valid == (model_count != 0), "m_valid vs occupancy");
      check(int'(level) == model_count, "level");
      if (model_count == int'(DEPTH)) begin
        full_seen++;
        if (s_valid) check(!s_ready, "full FIFO refuses push");
      end
      if (m_valid && m_ready) begin
        check(m_data == WIDTH'(got * 32'h9E37_79B9 + 7), "data order");
        got++;
      end
      if (s_valid && s_ready) sent++;
      model_count = model_count + int'(s_valid && s_ready) - int'(m_valid && m_ready);
      if (phase == 1) cycles_fast++;
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (got == int'(N) / 2 && sent == got);
    // second half: both sides always ready
    @(negedge clk) phase = 1;
    wait (got == int'(N));
    repeat (2) @(posedge clk);
    check(got == int'(N), "all elements delivered");
    check(full_seen > 0, "FIFO became full");
    // N/2 elements at one per cycle plus the one-cycle fill latency
    check(cycles_fast <= int'(N) / 2 + 4, "full rate without stalls");
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
