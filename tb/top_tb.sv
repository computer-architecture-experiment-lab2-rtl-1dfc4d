// top_tb: the whole board design at its default parameters, observed only
// through its ports, as a user at the board would: press the step buttons
// (with contact bounce) and read the two LCD lines of each CPU.
// Pipelined CPU, demonstration program: the clock count on the display
// follows the steps; every stage tag moves one stage per step; a beq in
// ID is followed by three NONE slots (the IF tag is read after the step
// button is released, since the instruction memory reads on the falling
// edge); the loop is taken once and then
// falls through to address 10; the register shown for the switches ends
// as expected. Multiple-cycle CPU, demonstration program: the state digit
// follows 0,1,3,5,9 / 0,1,2,8 / 0,1,4,7 / 0,1 as printed, type and code
// digits match the printed ones, and r6 ends as expected.
// Mechanism counters (each must be non-zero): debounced bounces, pipeline
// bubbles, taken and not-taken branches, loads; MC loads, stores, R-type
// write-backs and jumps.
`timescale 1ns/1ps
module top_tb;
  localparam int D = 500_000;          // top's default debounce length
  localparam int STEPS = 70;

  logic CCLK = 0;
  logic pl_btn_step = 0, pl_btn_reset = 0, mc_btn_step = 0, mc_btn_reset = 0;
  logic [3:0] pl_sw = 4'd6, mc_sw = 4'd6;
  logic [127:0] pl_line1, pl_line2, mc_line1, mc_line2;
  int checks = 0, failures = 0;
  int n_bounce = 0, n_bubble = 0, n_taken = 0, n_fall = 0, n_pl_lw = 0;
  int n_mc_lw = 0, n_mc_sw = 0, n_mc_r = 0, n_mc_j = 0;

  top dut (.CCLK, .pl_btn_step, .pl_btn_reset, .pl_sw, .pl_line1, .pl_line2,
           .mc_btn_step, .mc_btn_reset, .mc_sw, .mc_line1, .mc_line2);

  always #10 CCLK = ~CCLK;   // 50 MHz board clock

  initial begin
    #(64'd4_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t %s", $time, s); end
  endtask

  function automatic logic [7:0] ch(logic [127:0] l, int i);
    return l[127-8*i -: 8];
  endfunction
  function automatic int hx(logic [7:0] c);
    if (c >= "0" && c <= "9") return int'(c - "0");
    if (c >= "A" && c <= "F") return int'(c - "A") + 10;
    return -1;
  endfunction
  function automatic int hx2(logic [127:0] l, int i);
    return hx(ch(l, i)) * 16 + hx(ch(l, i + 1));
  endfunction
  function automatic int hx4(logic [127:0] l, int i);
    return hx2(l, i) * 256 + hx2(l, i + 2);
  endfunction

  // press/release all four buttons of a kind together, with bounce
  task automatic press(bit rst_btn, bit v);
    for (int b = 0; b < 3; b++) begin
      if (rst_btn) begin pl_btn_reset = v; mc_btn_reset = v; end
      else begin pl_btn_step = v; mc_btn_step = v; end
      repeat ($urandom_range(20, 200)) @(posedge CCLK);
      if (rst_btn) begin pl_btn_reset = !v; mc_btn_reset = !v; end
      else begin pl_btn_step = !v; mc_btn_step = !v; end
      repeat ($urandom_range(20, 200)) @(posedge CCLK);
      n_bounce++;
    end
    if (rst_btn) begin pl_btn_reset = v; mc_btn_reset = v; end
    else begin pl_btn_step = v; mc_btn_step = v; end
    repeat (D + 20) @(posedge CCLK);
  endtask

  int pl_types [5], pl_nums [5], prev_types [5], prev_nums [5];
  int id_types [$];
  int mc_states [$];
  int mc_codes [$];

  initial begin
    // power-up, then reset with one step clock edge inside it so the
    // memories see the reset address on a falling edge
    repeat (D + 20) @(posedge CCLK);
    press(1, 1);
    press(0, 1);
    press(0, 0);
    press(1, 0);
    check(hx2(pl_line1, 9) == 0, "clock count after reset");
    check(ch(pl_line2, 0) == "f" && ch(pl_line2, 3) == "d" && ch(pl_line2, 12) == "w", "stage names");
    for (int s = 0; s < 5; s++) begin pl_types[s] = 0; pl_nums[s] = 0; end
    pl_types[0] = hx(ch(pl_line2, 2)); pl_nums[0] = hx(ch(pl_line2, 1));
    for (int k = 1; k <= STEPS; k++) begin
      press(0, 1);                      // rising edge of both CPU clocks
      // pipeline display
      check(hx2(pl_line1, 9) == (k & 8'hff), $sformatf("clock count %0d", k));
      prev_types = pl_types; prev_nums = pl_nums;
      for (int s = 1; s < 5; s++) begin
        pl_types[s] = hx(ch(pl_line2, 3 * s + 2));
        pl_nums[s]  = hx(ch(pl_line2, 3 * s + 1));
      end
      for (int s = 1; s < 5; s++)
        check(pl_types[s] == prev_types[s-1] && pl_nums[s] == prev_nums[s-1],
              $sformatf("stage %0d tag after step %0d", s, k));
      id_types.push_back(pl_types[1]);
      if (pl_types[1] == 6) n_pl_lw++;
      if (pl_types[1] == 0 && id_types.size() > 1) n_bubble++;
      if (id_types.size() >= 5 && id_types[id_types.size() - 5] == 8) begin
        check(id_types[id_types.size() - 4] == 0 && id_types[id_types.size() - 3] == 0 &&
              id_types[id_types.size() - 2] == 0, "three NONE after beq");
        if (pl_nums[1] == 2) n_taken++;
        else if (pl_nums[1] == 10) n_fall++;
        else check(0, "beq went to an unexpected address");
      end
      // multiple-cycle display
      mc_states.push_back(hx(ch(mc_line2, 0)));
      mc_codes.push_back(hx(ch(mc_line2, 4)));
      press(0, 0);
      // the instruction memory reads on the falling edge: the IF tag is
      // complete only once the step button is released
      pl_types[0] = hx(ch(pl_line2, 2));
      pl_nums[0]  = hx(ch(pl_line2, 1));
    end
    // pipeline registers via the switches: r6 = 0000beef, r5 = ~beef0000
    pl_sw = 4'd6; #1 check(hx4(pl_line1, 12) == 16'hbeef, "pipeline r6");
    pl_sw = 4'd5; #1 check(hx4(pl_line1, 12) == 16'hffff, "pipeline r5");
    pl_sw = 4'd3; #1 check(hx4(pl_line1, 12) == 16'h0000, "pipeline r3 = -beef0000");
    // multiple-cycle CPU: state sequence of the first pass and r6
    begin
      int want [32] = '{0,1,3,5,9, 0,1,3,5,9, 0,1,2,8, 0,1,2,8, 0,1,2,8, 0,1,2,8, 0,1,4,7, 0,1};
      // state shown after step k is the state entered at that edge: step 1 -> ID
      for (int i = 0; i < 31; i++)
        check(mc_states[i] == want[i + 1], $sformatf("MC state after step %0d", i + 1));
      for (int i = 0; i < mc_states.size(); i++) begin
        if (mc_states[i] == 9) n_mc_lw++;
        if (mc_states[i] == 7) n_mc_sw++;
        if (mc_states[i] == 8) n_mc_r++;
        if (mc_states[i] == 1 && mc_codes[i] == 7) n_mc_j++;
      end
    end
    mc_sw = 4'd6; #1 check(hx4(mc_line2, 11) == 16'hbeee, "MC r6");
    check(hx(ch(mc_line2, 2)) >= 1, "MC type digit");
    $display("bounces %0d, bubbles %0d, taken %0d, fall-through %0d, pl loads %0d",
             n_bounce, n_bubble, n_taken, n_fall, n_pl_lw);
    $display("MC loads %0d, stores %0d, R write-backs %0d, jumps %0d", n_mc_lw, n_mc_sw, n_mc_r, n_mc_j);
    check(n_bounce > 0, "bounce mechanism");
    check(n_bubble > 0, "bubble mechanism");
    check(n_taken > 0, "taken branch");
    check(n_fall > 0, "not-taken branch");
    check(n_pl_lw > 0, "pipeline loads");
    check(n_mc_lw > 0 && n_mc_sw > 0 && n_mc_r > 0 && n_mc_j > 0, "MC mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
