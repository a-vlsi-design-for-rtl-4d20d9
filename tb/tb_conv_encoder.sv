// tb_conv_encoder: self-checking testbench for conv_encoder.
//
// 1. Encodes the 20-bit example message (0,0,1,0,1,0,0,0,1,1,0,1,0,0,1,0,0,1,
//    1,0) and compares the serial output with its known code word
//    (00,00,11,10,00,10,11,00,11,01,01,00,10,11,11,10,11,11,01,01).
// 2. Encodes 400 random bits, offered with random gaps, and compares every
//    frame with a model that keeps the last two input bits and forms
//    v1 = u_t ^ u_{t-1} ^ u_{t-2}, v2 = u_t ^ u_{t-2}.
// Also checks the rate: with u_valid held high a bit is accepted every
// second cycle and a code bit leaves on every cycle.
module tb_conv_encoder;
  logic clk = 1'b0;
  logic rst_n;
  logic u, u_valid, u_ready;
  logic [1:0] v;
  logic ser_bit, ser_valid, ser_first;
  logic [1:0] state;
  int checks = 0, failures = 0;

  localparam logic [19:0] MSG  = 20'b0_1_1_0_0_1_0_0_1_0_1_1_0_0_0_1_0_1_0_0; // bit i = u_{i+1}
  localparam logic [1:0] CODE [20] = '{2'b00, 2'b00, 2'b11, 2'b10, 2'b00,
                                       2'b10, 2'b11, 2'b00, 2'b11, 2'b01,
                                       2'b01, 2'b00, 2'b10, 2'b11, 2'b11,
                                       2'b10, 2'b11, 2'b11, 2'b01, 2'b01};

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collect serial output into frames.
  logic [1:0] got [$];
  logic       first_bit;
  logic       have_first = 1'b0;
  int         ser_cycles = 0;
  always @(posedge clk) begin
    if (rst_n && ser_valid) begin
      ser_cycles++;
      if (ser_first) begin
        first_bit  = ser_bit;
        have_first = 1'b1;
      end else if (have_first) begin
        got.push_back({first_bit, ser_bit});
        have_first = 1'b0;
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [1:0] expq [$];
  logic u1, u2;   // u_{t-1}, u_{t-2}

  initial begin
    int accepted, cycles;
    bit acc;
    rst_n = 1'b0; u = 1'b0; u_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(state == 2'b00, "reset state is S0");

    // Part 1: example message, u_valid held high to measure the rate.
    accepted = 0; cycles = 0;
    while (accepted < 20) begin
      u = MSG[accepted]; u_valid = 1'b1;
      #1 acc = u_ready;
      @(posedge clk);
      cycles++;
      if (acc) accepted++;
      #1;
    end
    u_valid = 1'b0;
    check(cycles == 39, $sformatf("20 bits take 39 cycles, took %0d", cycles));
    repeat (4) @(posedge clk);
    check(got.size() == 20, $sformatf("20 frames out, got %0d", got.size()));
    for (int i = 0; i < 20 && i < got.size(); i++)
      check(got[i] == CODE[i], $sformatf("example frame %0d: %b vs %b", i + 1, got[i], CODE[i]));
    check(ser_cycles == 40, $sformatf("one code bit per cycle: %0d", ser_cycles));

    // Part 2: random bits with random gaps, after a fresh reset.
    got.delete();
    #1 rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    u1 = 1'b0; u2 = 1'b0;
    accepted = 0;
    while (accepted < 400) begin
      u = 1'($urandom); u_valid = ($urandom % 3) != 0;
      #1 acc = u_valid && u_ready;
      @(posedge clk);
      if (acc) begin
        expq.push_back({u ^ u1 ^ u2, u ^ u2});
        u2 = u1; u1 = u;
        accepted++;
      end
      #1;
    end
    u_valid = 1'b0;
    repeat (4) @(posedge clk);
    check(got.size() == 400, $sformatf("400 random frames out, got %0d", got.size()));
    for (int i = 0; i < 400 && i < got.size(); i++)
      check(got[i] == expq[i], $sformatf("random frame %0d: %b vs %b", i, got[i], expq[i]));
    check(state == {u1, u2}, "final shift register contents");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
