// tb_path_unit: self-checking testbench for path_unit.
//
// Drives an odd unit (Y and X registers) and an even unit (Y only) of the
// default code, and an odd unit of a memory-3 code, with random selection
// vectors, states and advance enables. Checks that the registers load only
// on advance and that the trace-back output equals the state X without its
// first bit followed by bit X of Y, e.g. X = 11 with Y(3) = 0 gives 10.
module tb_path_unit;
  logic clk = 1'b0;
  logic rst_n, advance;
  logic [3:0] y_in, y_q_o, y_q_e;
  logic [1:0] x_in, x_q_o, x_nx_o, x_q_e, x_nx_e;
  logic [7:0] y_in3, y_q3;
  logic [2:0] x_in3, x_q3, x_nx3;
  int checks = 0, failures = 0;

  path_unit #(.HAS_X(1'b1)) dut_odd (.clk, .rst_n, .advance, .y_in, .x_in,
    .y_q(y_q_o), .x_q(x_q_o), .x_next(x_nx_o));
  path_unit #(.HAS_X(1'b0)) dut_even (.clk, .rst_n, .advance, .y_in, .x_in,
    .y_q(y_q_e), .x_q(x_q_e), .x_next(x_nx_e));
  path_unit #(.M(3)) dut3 (.clk, .rst_n, .advance, .y_in(y_in3), .x_in(x_in3),
    .y_q(y_q3), .x_q(x_q3), .x_next(x_nx3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [3:0] ey; logic [1:0] ex;
    logic [7:0] ey3; logic [2:0] ex3;
    rst_n = 1'b0; advance = 1'b0; y_in = '0; x_in = '0; y_in3 = '0; x_in3 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(y_q_o == 0 && x_q_o == 0 && y_q_e == 0 && y_q3 == 0 && x_q3 == 0, "reset clears");

    // Directed: X = 11, Y = [S0..S3] = 1,0,0,0 (bit 3 = 0) gives 10.
    y_in = 4'b0001; x_in = 2'b11; advance = 1'b1;
    @(posedge clk); #1;
    check(x_nx_o == 2'b10, $sformatf("DMSB(11)*y(3)=10, got %b", x_nx_o));
    y_in = 4'b0100; x_in = 2'b10;
    @(posedge clk); #1;
    check(x_nx_o == 2'b01, $sformatf("DMSB(10)*y(2)=01, got %b", x_nx_o));

    ey = y_q_o; ex = x_q_o; ey3 = y_q3; ex3 = x_q3;
    for (int i = 0; i < 500; i++) begin
      y_in = 4'($urandom); x_in = 2'($urandom); advance = 1'($urandom);
      y_in3 = 8'($urandom); x_in3 = 3'($urandom);
      if (advance) begin ey = y_in; ex = x_in; ey3 = y_in3; ex3 = x_in3; end
      @(posedge clk); #1;
      check(y_q_o == ey && x_q_o == ex, "odd unit registers");
      check(y_q_e == ey, "even unit Y register");
      check(x_nx_o == {ex[0], ey[ex]}, $sformatf("trace step X=%b Y=%b -> %b", ex, ey, x_nx_o));
      check(y_q3 == ey3 && x_q3 == ex3, "memory-3 unit registers");
      check(x_nx3 == {ex3[1:0], ey3[ex3]}, $sformatf("memory-3 trace step X=%b -> %b", ex3, x_nx3));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
