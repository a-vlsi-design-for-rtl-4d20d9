// tb_selection_unit: self-checking testbench for selection_unit.
//
// 1. Feeds the 20 received frames of the worked example for the
//    constraint-length-3 code and checks the selection vectors y_t against
//    the values known for that example (y_2..y_5 and y_7..y_11), the
//    survivor metrics P_1..P_3 and P_20 (after removing the common offset
//    the unit subtracts) and the smallest-metric state at time units 10, 11
//    and 20.
// 2. Feeds random frames, some erased, to the default unit and to a unit
//    for a memory-3 code, comparing y, m and the metrics with the
//    reference model on every time unit.
// A time unit happens in the clock cycle where advance is high, so the
// unit completes one add-compare-select per clock.
module tb_selection_unit;
  import viterbi_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic advance, erase;
  logic [1:0] r;
  logic [3:0] y;
  logic [1:0] m;
  logic [3:0][5:0] metric;
  logic [7:0] y3;
  logic [2:0] m3;
  logic [7:0][5:0] metric3;
  int checks = 0, failures = 0;

  selection_unit dut (.clk, .rst_n, .advance, .erase, .r, .y, .m, .metric);
  selection_unit #(.M(3), .G0(4'b1111), .G1(4'b1101)) dut3 (
    .clk, .rst_n, .advance, .erase, .r, .y(y3), .m(m3), .metric(metric3));

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

  localparam logic [1:0] RX [20] = '{2'b00, 2'b01, 2'b11, 2'b10, 2'b10,
                                     2'b10, 2'b11, 2'b00, 2'b11, 2'b11,
                                     2'b01, 2'b00, 2'b10, 2'b10, 2'b11,
                                     2'b10, 2'b11, 2'b11, 2'b01, 2'b01};
  // Example selection vectors, listed in the state order S0,S2,S1,S3.
  // Entry 0 marks a vector that is not checked.
  localparam logic [4:0] YEX [12] = '{5'h00, 5'h00, 5'b1_0000, 5'b1_0000,
                                      5'b1_1101, 5'b1_1101, 5'h00, 5'b1_1011,
                                      5'b1_0100, 5'b1_0000, 5'b1_1000, 5'b1_1110};

  // Comparison of the unit's outputs (before the clock edge) with the model.
  task automatic compare(vit_ref ref_m, input logic [7:0] yh, input int mh,
                         input logic [7:0][5:0] ph, input string tag);
    for (int k = 0; k < ref_m.ns; k++)
      if (ref_m.y_def[k])
        check(yh[k] == ref_m.y_last[k],
              $sformatf("%s t=%0d y(%0d) %b vs %b", tag, ref_m.t, k, yh[k], ref_m.y_last[k]));
    check(mh == ref_m.m_last, $sformatf("%s t=%0d m %0d vs %0d", tag, ref_m.t, mh, ref_m.m_last));
  endtask

  task automatic compare_metrics(vit_ref ref_m, input logic [7:0][5:0] ph, input string tag);
    for (int k = 0; k < ref_m.ns; k++)
      if (ref_m.reach[k])
        check(longint'(ph[k]) == ref_m.p[k] - ref_m.min_last,
              $sformatf("%s t=%0d P(%0d) %0d vs %0d", tag, ref_m.t, k, ph[k], ref_m.p[k] - ref_m.min_last));
  endtask

  initial begin
    vit_ref rm, rm3;
    logic [3:0] yo;
    rm  = new(2, 'b111, 'b101, 10, 1'b1);
    rm3 = new(3, 'b1111, 'b1101, 15, 1'b1);
    rst_n = 1'b0; advance = 1'b0; erase = 1'b0; r = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(metric[0] == 0 && metric[1] == '1 && metric[2] == '1 && metric[3] == '1,
          "initial metrics 0 and infinity");

    // Part 1: worked example.
    for (int t = 1; t <= 20; t++) begin
      r = RX[t-1]; advance = 1'b1;
      rm.step(1'b0, int'(RX[t-1]));
      #1;
      compare(rm, 8'(y), int'(m), 48'(metric), "example");
      yo = {y[0], y[2], y[1], y[3]};  // S0,S2,S1,S3 from bit 3 down
      if (t <= 11 && YEX[t][4])
        check(yo == YEX[t][3:0], $sformatf("example y_%0d = %b, expected %b", t, yo, YEX[t][3:0]));
      if (t == 10) check(m == 2'd3, "example: smallest-metric state at t=10 is S3");
      if (t == 11) check(m == 2'd1, "example: smallest-metric state at t=11 is S1");
      if (t == 20) check(m == 2'd1, "example: smallest-metric state at t=20 is S1");
      @(posedge clk);
      #1;
      compare_metrics(rm, 48'(metric), "example");
      case (t)
        1: check(metric[0] == 0 && metric[2] == 2, "example P_1 = (0,-,2,-)");
        2: check(metric[0] == 0 && metric[1] == 3 && metric[2] == 0 && metric[3] == 1,
                 "example P_2 = (1,4,1,2) less 1");
        3: check(metric[0] == 2 && metric[1] == 1 && metric[2] == 0 && metric[3] == 1,
                 "example P_3 = (3,2,1,2) less 1");
        20: check(metric[1] == 0 && metric[0] == 3 && metric[2] == 3 && metric[3] == 2,
                  "example P_20 = (7,4,7,6) less 4");
        default: ;
      endcase
    end
    advance = 1'b0;
    @(posedge clk);
    #1 check(metric[1] == 0 && metric[0] == 3, "metrics hold without advance");

    // Part 2: random frames for both units.
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    rm  = new(2, 'b111, 'b101, 10, 1'b1);
    for (int t = 1; t <= 400; t++) begin
      logic e;
      logic [1:0] rr;
      e  = ($urandom % 8) == 0;
      rr = 2'($urandom);
      r = rr; erase = e; advance = ($urandom % 5) != 0;
      #1;
      if (advance) begin
        rm.step(e, int'(rr));
        rm3.step(e, int'(rr));
        compare(rm, 8'(y), int'(m), 48'(metric), "rand2");
        compare(rm3, y3, int'(m3), metric3, "rand3");
      end
      @(posedge clk);
      #1;
      compare_metrics(rm, 48'(metric), "rand2");
      compare_metrics(rm3, metric3, "rand3");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
