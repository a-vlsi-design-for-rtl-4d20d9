// tb_systolic_viterbi_decoder: self-checking testbench for the systolic
// Viterbi decoder.
//
// Four decoders run side by side on the same schedule of time units:
//   d0  default: constraint-length-3 code, window 10, 19 path units
//   d1  REDUCED = 1 (17 path units, one time unit less latency)
//   d2  TRACE_FROM_BEST = 0 (every trace-back starts at S0)
//   d3  memory-3 code (15,13 octal), window 15, 29 path units
// d0..d2 receive the same frames; d3 receives frames of its own code.
// Every decoded bit is compared with the reference model (block trace-back
// of the same window from the same start state), and the time unit at
// which each bit leaves is checked: bit j of the stream must follow time
// unit j + LAT (LAT = 20, 19, 20 and 30).
//   1. The 20 received frames of the worked example (four channel errors),
//      then 19 erased time units: d0..d2 must return the transmitted message
//      0,0,1,0,1,0,0,0,1,1,0,1,0,0,1,0,0,1,1,0, the first bit at time unit
//      20 (19 for d1).
//      The state registers are checked against the two trace-backs of the
//      example (windows ending at time units 10 and 11).
//   2. 600 random information bits per code, encoded by the model, with
//      about 3% of the code bits flipped and random idle cycles between
//      time units, then a flush.
module tb_systolic_viterbi_decoder;
  import viterbi_ref_pkg::*;

  localparam int ND = 4;
  localparam int LAT [ND] = '{20, 19, 20, 30};

  logic clk = 1'b0;
  logic rst_n;
  logic [1:0] r2, r3;
  logic r_valid, flush;
  logic [ND-1:0] z, zv;
  int checks = 0, failures = 0;

  systolic_viterbi_decoder d0 (.clk, .rst_n, .r(r2), .r_valid, .flush,
    .z(z[0]), .z_valid(zv[0]), .best_state(), .metric());
  systolic_viterbi_decoder #(.REDUCED(1'b1)) d1 (.clk, .rst_n, .r(r2), .r_valid, .flush,
    .z(z[1]), .z_valid(zv[1]), .best_state(), .metric());
  systolic_viterbi_decoder #(.TRACE_FROM_BEST(1'b0)) d2 (.clk, .rst_n, .r(r2), .r_valid, .flush,
    .z(z[2]), .z_valid(zv[2]), .best_state(), .metric());
  systolic_viterbi_decoder #(.M(3), .G0(4'b1111), .G1(4'b1101)) d3 (.clk, .rst_n, .r(r3),
    .r_valid, .flush, .z(z[3]), .z_valid(zv[3]), .best_state(), .metric());

  always #5 clk = ~clk;

  // State registers X_1, X_3, .. X_19 of d0 and X_1 .. X_17 of d1.
  logic [1:0] xr0 [10];
  logic [1:0] xr1 [9];
  for (genvar n = 0; n < 10; n++) begin : g_x0
    assign xr0[n] = d0.g_pu[2*n+1].u_pu.x_q;
  end
  for (genvar n = 0; n < 9; n++) begin : g_x1
    assign xr1[n] = d1.g_pu[2*n+1].u_pu.x_q;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  vit_ref rm [ND];
  int     exp_bits [ND][$];
  int     got_bits [ND][$];
  int     n_adv;           // time units since reset
  int     n_out [ND];

  // Output monitor, sampled mid-cycle: every z_valid pulse follows the time
  // unit counted at the clock edge before it.
  always @(negedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < ND; d++)
        if (zv[d]) begin
          check(n_adv == LAT[d] + n_out[d],
                $sformatf("d%0d: bit %0d after time unit %0d, expected %0d",
                          d, n_out[d], n_adv, LAT[d] + n_out[d]));
          got_bits[d].push_back(int'(z[d]));
          n_out[d]++;
        end
    end
  end

  task automatic restart();
    rst_n = 1'b0; r_valid = 1'b0; flush = 1'b0; r2 = '0; r3 = '0;
    rm[0] = new(2, 'b111, 'b101, 10, 1'b1);
    rm[1] = new(2, 'b111, 'b101, 10, 1'b1);
    rm[2] = new(2, 'b111, 'b101, 10, 1'b0);
    rm[3] = new(3, 'b1111, 'b1101, 15, 1'b1);
    for (int d = 0; d < ND; d++) begin
      exp_bits[d].delete(); got_bits[d].delete(); n_out[d] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    n_adv = 0;
  endtask

  // One time unit: frames for both codes, or an erased unit.
  task automatic time_unit(input bit erase, input logic [1:0] f2, input logic [1:0] f3);
    r2 = f2; r3 = f3; r_valid = !erase; flush = erase;
    for (int d = 0; d < ND; d++) begin
      int b;
      rm[d].step(erase, (d == 3) ? int'(f3) : int'(f2));
      b = rm[d].decode();
      if (b >= 0) exp_bits[d].push_back(b);
    end
    @(posedge clk);
    n_adv++;
    #1 r_valid = 1'b0; flush = 1'b0;
  endtask

  task automatic compare_streams(input string tag);
    @(posedge clk); #1;
    for (int d = 0; d < ND; d++) begin
      check(got_bits[d].size() == n_adv - LAT[d] + 1,
            $sformatf("%s d%0d: %0d bits out, expected %0d", tag, d,
                      got_bits[d].size(), n_adv - LAT[d] + 1));
      for (int i = 0; i < got_bits[d].size() && i < exp_bits[d].size(); i++)
        check(got_bits[d][i] == exp_bits[d][i],
              $sformatf("%s d%0d bit %0d: %0d vs model %0d", tag, d, i,
                        got_bits[d][i], exp_bits[d][i]));
    end
  endtask

  localparam logic [1:0] RX [20] = '{2'b00, 2'b01, 2'b11, 2'b10, 2'b10,
                                     2'b10, 2'b11, 2'b00, 2'b11, 2'b11,
                                     2'b01, 2'b00, 2'b10, 2'b10, 2'b11,
                                     2'b10, 2'b11, 2'b11, 2'b01, 2'b01};
  // Trace-backs of the example for the windows ending at time units 10 and
  // 11: survivor states at times 10, 9, .. 1 (from S3) and 11, 10, .. 2
  // (from S1). X_{2n+1} must hold entry n at time unit start + n.
  localparam logic [1:0] TB10 [10] = '{3, 2, 0, 0, 1, 2, 1, 2, 0, 0};
  localparam logic [1:0] TB11 [10] = '{1, 3, 2, 0, 0, 1, 2, 1, 2, 0};
  localparam int MSG [20] = '{0,0,1,0,1,0,0,0,1,1,0,1,0,0,1,0,0,1,1,0};

  initial begin
    int s2, s3, nerr, nbits, bit_err;
    int msg2 [$], msg3 [$];

    // Part 1: worked example.
    restart();
    for (int t = 0; t < 20; t++) begin
      time_unit(1'b0, RX[t], 2'($urandom));
      for (int n = 0; n < 10; n++) begin
        if (n_adv == 10 + n) begin
          check(xr0[n] == TB10[n], $sformatf("window W1: X_%0d = %b at time unit %0d, expected %b",
                                             2*n+1, xr0[n], n_adv, TB10[n]));
          if (n < 9) check(xr1[n] == TB10[n], $sformatf("reduced W1: X_%0d = %b", 2*n+1, xr1[n]));
        end
        if (n_adv == 11 + n)
          check(xr0[n] == TB11[n], $sformatf("window W2: X_%0d = %b at time unit %0d, expected %b",
                                             2*n+1, xr0[n], n_adv, TB11[n]));
      end
    end
    for (int t = 0; t < 19; t++) time_unit(1'b1, 2'b00, 2'b00);
    compare_streams("example");
    for (int d = 0; d < 3; d++)
      for (int i = 0; i < 20; i++)
        check(i < got_bits[d].size() && got_bits[d][i] == MSG[i],
              $sformatf("example d%0d: decoded bit %0d", d, i + 1));

    // Part 2: random messages through a binary symmetric channel.
    restart();
    s2 = 0; s3 = 0; nerr = 0;
    for (int t = 0; t < 600; t++) begin
      int u2, u3, f2, f3;
      u2 = $urandom % 2; u3 = $urandom % 2;
      msg2.push_back(u2); msg3.push_back(u3);
      f2 = rm[0].frame(s2, u2); f3 = rm[3].frame(s3, u3);
      s2 = (u2 << 1) | (s2 >> 1);
      s3 = (u3 << 2) | (s3 >> 1);
      for (int b = 0; b < 2; b++) begin
        if ($urandom % 33 == 0) begin f2 ^= (1 << b); nerr++; end
        if ($urandom % 33 == 0) begin f3 ^= (1 << b); end
      end
      while ($urandom % 4 == 0) begin @(posedge clk); #1; end
      time_unit(1'b0, 2'(f2), 2'(f3));
    end
    for (int t = 0; t < 29; t++) time_unit(1'b1, 2'b00, 2'b00);
    compare_streams("random");
    nbits = 0; bit_err = 0;
    for (int i = 0; i < 600 && i < got_bits[0].size(); i++) begin
      nbits++;
      if (got_bits[0][i] != msg2[i]) bit_err++;
    end
    $display("random: %0d channel errors, %0d of %0d decoded bits wrong (default decoder)",
             nerr, bit_err, nbits);
    check(nerr > 0, "channel errors were injected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
