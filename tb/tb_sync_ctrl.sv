// tb_sync_ctrl: walks the controller through one acquisition with the
// neighbouring blocks' handshakes emulated: search done with the peak at
// sample 350, second accumulation done, CP window, CORDIC and decision.
// Checks the state order, the derived boundary and second-half sample, the
// position and length of the CP window, the single start pulses, the
// enables of each state, and that a second start restarts the search.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_sync_ctrl;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, s_valid = 0;
  logic finder_done = 0, storage_done = 0, angle_done = 0, decide_done = 0;
  logic [11:0] best_n = 0;
  sync_state_e state;
  logic [11:0] n_cnt, half1_n, boundary;
  logic clear, bank_en, half1_en, dl_en, fcfo_enable, angle_start, decide_start, boundary_valid;
  int checks = 0, failures = 0;
  int win_first = -1, win_count = 0, n_angle = 0, n_decide = 0, n_clear = 0;

  sync_ctrl dut (.*);
  always #5 clk = !clk;


  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %0d n %0d)", what, state, n_cnt); end
  endtask

  always @(posedge clk) begin
    if (s_valid && fcfo_enable) begin
      if (win_first < 0) win_first = int'(n_cnt);
      win_count++;
    end
  end

  // registered pulses, counted half a cycle after they rise
  always @(negedge clk) begin
    if (angle_start) n_angle++;
    if (decide_start) n_decide++;
    if (clear) n_clear++;
  end

  // enables must follow the state
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (bank_en != (state == ST_SEARCH || state == ST_ACC2) ||
        dl_en != (state == ST_SEARCH || state == ST_ACC2 || state == ST_FCFO) ||
        half1_en != (state == ST_ACC2) || (fcfo_enable && state != ST_FCFO)) begin
      failures++;
      $display("FAIL enables in state %0d", state);
    end
  end

  task automatic sample();
    @(negedge clk) s_valid = 1;
    @(negedge clk) s_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) sample();
    check(state == ST_IDLE, "idle after reset");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    @(negedge clk);
    check(state == ST_SEARCH && n_clear == 1, "search after start");
    for (int n = 0; n < 499; n++) sample();
    check(n_cnt == 12'd499, "sample counter");
    @(negedge clk) finder_done = 1; best_n = 12'd350;
    @(negedge clk) finder_done = 0;
    check(state == ST_ACC2 && half1_n == 12'd650 && boundary == 12'd51 && boundary_valid,
          "second half sample and boundary");
    for (int n = 499; n < 660; n++) sample();
    check(state == ST_ACC2, "waits for second accumulation");
    @(negedge clk) storage_done = 1;
    @(negedge clk) storage_done = 0;
    check(state == ST_FCFO, "CP window state");
    while (state == ST_FCFO && n_cnt < 12'd1400) sample();
    check(win_first == 51 + 1024 && win_count == 128, $sformatf("CP window %0d +%0d", win_first, win_count));
    check(state == ST_ANGLE, "angle state");
    repeat (5) @(negedge clk);
    check(n_angle == 1, $sformatf("one CORDIC start %0d", n_angle));
    @(negedge clk) angle_done = 1;
    @(negedge clk) angle_done = 0;
    @(negedge clk);
    check(state == ST_DECIDE && n_decide == 1, "decision started");
    @(negedge clk) decide_done = 1;
    @(negedge clk) decide_done = 0;
    check(state == ST_TRACK, "tracking");
    repeat (20) sample();
    check(state == ST_TRACK && !bank_en && !dl_en, "tracking holds, estimators asleep");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    @(negedge clk);
    check(state == ST_SEARCH && n_cnt == 0 && !boundary_valid && n_clear == 2, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
