// mb_pipe_ctrl_tb: four model stages with random processing times answer the start
// pulses of mb_pipe_ctrl. Checks that every stage sees MB 0..N-1 in order, that stage s
// gets MB t-s in slot t, that a slot does not end before its slowest stage, the number
// of slots (N+3), and that faster stages waited at least once.
module mb_pipe_ctrl_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frame_start, busy, frame_done; logic [15:0] num_mb, slot; logic [3:0] stage_done,
  stage_start, stage_act; logic [15:0] stage_mb[4]; logic [31:0] wait_cycles;
  mb_pipe_ctrl dut (.*);
  int checks = 0, failures = 0;
  int next_mb[4], busy_cnt[4], slots_seen;

  always @(posedge clk) begin
    for (int s = 0; s < 4; s++) begin
      stage_done[s] <= 1'b0;
      if (stage_start[s]) begin
        checks++;
        if (int'(stage_mb[s]) != next_mb[s] || int'(stage_mb[s]) != int'(slot) - s) begin
          failures++; $display("FAIL stage %0d got MB %0d exp %0d", s, stage_mb[s], next_mb[s]);
        end
        next_mb[s]++;
        busy_cnt[s] <= $urandom_range(1, 20);
      end else if (busy_cnt[s] > 0) begin
        busy_cnt[s] <= busy_cnt[s] - 1;
        if (busy_cnt[s] == 1) stage_done[s] <= 1'b1;
      end
    end
  end
  // a new slot may start only when no stage is still counting
  always @(posedge clk) if (|stage_start) begin
    slots_seen++;
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (busy_cnt[s] > 1) begin failures++; $display("FAIL slot started while stage %0d busy", s); end
    end
  end

  initial begin
    frame_start = 0; num_mb = 0;
    for (int s = 0; s < 4; s++) begin next_mb[s] = 0; busy_cnt[s] = 0; end
    stage_done = 0; slots_seen = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int n;
      n = (f == 0) ? 1 : 10 + f;
      for (int s = 0; s < 4; s++) next_mb[s] = 0;
      slots_seen = 0;
      @(negedge clk); num_mb = 16'(n); frame_start = 1;
      @(negedge clk); frame_start = 0;
      while (!frame_done) @(negedge clk);
      for (int s = 0; s < 4; s++) begin checks++; if (next_mb[s] != n) failures++; end
      checks++; if (slots_seen != n + 3) begin failures++; $display("FAIL slots %0d", slots_seen); end
    end
    checks++; if (wait_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
