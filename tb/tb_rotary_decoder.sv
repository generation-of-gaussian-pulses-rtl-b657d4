// tb_rotary_decoder: turns the modelled rotary switch both ways, with contact bounce,
// and presses its button, with and without short glitches. Checks one step event per
// detent with the right direction, and one press event per real press.
module tb_rotary_decoder;
  logic clk = 1'b0, rst = 1'b1;
  logic rot_a = 1'b0, rot_b = 1'b0, rot_center = 1'b0;
  logic step, dir_up, press;
  int   checks = 0, failures = 0;
  int   ups = 0, downs = 0, presses = 0;

  always #5 clk = ~clk;

  rotary_decoder #(.DEBOUNCE_CLKS(20)) dut (
    .clk, .rst, .rot_a, .rot_b, .rot_center, .step_o (step), .dir_up_o (dir_up), .press_o (press)
  );

  always @(posedge clk) if (!rst) begin
    if (step && dir_up)  ups++;
    if (step && !dir_up) downs++;
    if (press)           presses++;
  end

  task automatic wait_clk(int n);
    repeat (n) @(posedge clk);
  endtask

  // One detent; first contact closes first, with optional bounce on it.
  task automatic detent(bit up, bit bounce);
    if (bounce) repeat (3) begin
      if (up) rot_a = 1'b1; else rot_b = 1'b1;
      wait_clk(2);
      if (up) rot_a = 1'b0; else rot_b = 1'b0;
      wait_clk(2);
    end
    if (up) rot_a = 1'b1; else rot_b = 1'b1;
    wait_clk(10);
    if (up) rot_b = 1'b1; else rot_a = 1'b1;
    if (bounce) repeat (3) begin
      wait_clk(2);
      if (up) rot_b = 1'b0; else rot_a = 1'b0;
      wait_clk(2);
      if (up) rot_b = 1'b1; else rot_a = 1'b1;
    end
    wait_clk(10);
    if (up) rot_a = 1'b0; else rot_b = 1'b0;
    wait_clk(10);
    if (up) rot_b = 1'b0; else rot_a = 1'b0;
    wait_clk(10);
  endtask

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    wait_clk(5);
    rst = 1'b0;
    wait_clk(5);
    repeat (3) detent(1'b1, 1'b0);
    check("up steps", ups, 3);
    check("down steps", downs, 0);
    repeat (2) detent(1'b0, 1'b0);
    check("down steps", downs, 2);
    repeat (4) detent(1'b1, 1'b1);
    check("up steps with bounce", ups, 7);
    repeat (5) detent(1'b0, 1'b1);
    check("down steps with bounce", downs, 7);
    // button glitches shorter than the debounce time
    repeat (5) begin rot_center = 1'b1; wait_clk(8); rot_center = 1'b0; wait_clk(8); end
    check("glitch presses", presses, 0);
    rot_center = 1'b1; wait_clk(60);
    check("one press", presses, 1);
    rot_center = 1'b0; wait_clk(60);
    check("no press on release", presses, 1);
    rot_center = 1'b1; wait_clk(60); rot_center = 1'b0; wait_clk(60);
    check("second press", presses, 2);
    check("total steps", ups + downs, 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
