// tb_viterbi_codec_full: one complete operation of the default top level,
// all parameters at their defaults.
//
// The 20-bit example message 0,0,1,0,1,0,0,0,1,1,0,1,0,0,1,0,0,1,1,0 is
// encoded; the serial output must be the code word
// 00,00,11,10,00,10,11,00,11,01,01,00,10,11,11,10,11,11,01,01. The
// received version of that code word with four channel errors (in frames
// 2, 5, 10 and 14) is then decoded, followed by 19 erased time units. The
// decoder must return the original message, one bit per time unit, the
// first bit at time unit 20; the smallest survivor metric after the 20
// received frames must be 4, for state S1.
module tb_viterbi_codec_full;
  logic clk = 1'b0;
  logic rst_n;
  logic enc_u, enc_u_valid, enc_u_ready;
  logic [1:0] enc_v, enc_state;
  logic ser_bit, ser_valid, ser_first;
  logic [1:0] dec_r;
  logic dec_r_valid, dec_flush, dec_z, dec_z_valid;
  logic [1:0] dec_best_state;
  logic [3:0][5:0] dec_metric;
  int checks = 0, failures = 0;

  viterbi_codec_top dut (.clk, .rst_n, .enc_u, .enc_u_valid, .enc_u_ready,
    .enc_v, .enc_ser_bit(ser_bit), .enc_ser_valid(ser_valid),
    .enc_ser_first(ser_first), .enc_state, .dec_r, .dec_r_valid, .dec_flush,
    .dec_z, .dec_z_valid, .dec_best_state, .dec_metric);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  localparam logic MSG [20] = '{0,0,1,0,1,0,0,0,1,1,0,1,0,0,1,0,0,1,1,0};
  localparam logic [1:0] CODE [20] = '{2'b00, 2'b00, 2'b11, 2'b10, 2'b00,
                                       2'b10, 2'b11, 2'b00, 2'b11, 2'b01,
                                       2'b01, 2'b00, 2'b10, 2'b11, 2'b11,
                                       2'b10, 2'b11, 2'b11, 2'b01, 2'b01};
  localparam logic [1:0] RX [20] = '{2'b00, 2'b01, 2'b11, 2'b10, 2'b10,
                                     2'b10, 2'b11, 2'b00, 2'b11, 2'b11,
                                     2'b01, 2'b00, 2'b10, 2'b10, 2'b11,
                                     2'b10, 2'b11, 2'b11, 2'b01, 2'b01};

  logic [1:0] frames [$];
  logic       first_bit;
  int         n_adv, n_out;
  logic       got [$];

  always @(negedge clk) begin
    if (rst_n && ser_valid) begin
      if (ser_first) first_bit = ser_bit;
      else frames.push_back({first_bit, ser_bit});
    end
    if (rst_n && dec_z_valid) begin
      check(n_adv == 20 + n_out, $sformatf("bit %0d after time unit %0d", n_out, n_adv));
      got.push_back(dec_z);
      n_out++;
    end
  end

  initial begin
    int sent;
    bit acc;
    rst_n = 1'b0; enc_u = 1'b0; enc_u_valid = 1'b0;
    dec_r = '0; dec_r_valid = 1'b0; dec_flush = 1'b0;
    n_adv = 0; n_out = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // encode
    sent = 0;
    while (sent < 20) begin
      enc_u = MSG[sent]; enc_u_valid = 1'b1;
      #1 acc = enc_u_ready;
      @(posedge clk);
      if (acc) sent++;
      #1;
    end
    enc_u_valid = 1'b0;
    repeat (3) @(posedge clk);
    check(frames.size() == 20, $sformatf("20 frames encoded, got %0d", frames.size()));
    for (int i = 0; i < 20 && i < frames.size(); i++)
      check(frames[i] == CODE[i], $sformatf("code frame %0d: %b", i + 1, frames[i]));

    // decode the received sequence, then flush
    #1;
    for (int t = 0; t < 39; t++) begin
      dec_r = (t < 20) ? RX[t] : 2'b00;
      dec_r_valid = (t < 20);
      dec_flush = (t >= 20);
      @(posedge clk);
      n_adv++;
      #1 dec_r_valid = 1'b0; dec_flush = 1'b0;
      if (t == 19)
        check(dec_metric[1] == 0 && dec_metric[0] == 3 && dec_metric[2] == 3 &&
              dec_metric[3] == 2, "survivor metrics (7,4,7,6) less 4 at time unit 20");
    end
    @(posedge clk); #1;
    check(got.size() == 20, $sformatf("20 bits decoded, got %0d", got.size()));
    for (int i = 0; i < 20 && i < got.size(); i++)
      check(got[i] == MSG[i], $sformatf("decoded bit %0d = %0d", i + 1, got[i]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
