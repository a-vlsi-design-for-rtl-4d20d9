// tb_viterbi_codec_top: end-to-end testbench of the encoder and the
// systolic Viterbi decoder.
//
// A random message is streamed into the encoder of the default top (t0);
// its serial output is paired back into frames, about 3% of the code bits
// are flipped (binary symmetric channel), and the frames are fed to the
// decoders of three tops: t0 (defaults), t1 (REDUCED = 1) and t2
// (TRACE_FROM_BEST = 0). The encoders of t1 and t2 receive the same bits
// and must produce the same frames. Each decoded stream is compared bit
// for bit with the reference model and its output timing checked (bit j
// after time unit j + 20, or j + 19 for t1); after the message the
// decoders are flushed with erased time units until every bit is out.
// Every mechanism of the design is counted and must occur at least once:
// frame serialisation, survivor choice of either predecessor, a best state
// other than S0, metric renormalisation, unreachable (infinite-metric)
// states at start-up, erased (flush) time units, channel errors, and output
// from each of the three decoder variants.
module tb_viterbi_codec_top;
  import viterbi_ref_pkg::*;

  localparam int NT   = 3;
  localparam int NMSG = 500;
  localparam int LAT [NT] = '{20, 19, 20};

  logic clk = 1'b0;
  logic rst_n;
  logic enc_u, enc_u_valid;
  logic [NT-1:0] enc_u_ready, ser_bit, ser_valid, ser_first;
  logic [1:0] enc_v [NT];
  logic [1:0] enc_state [NT];
  logic [1:0] dec_r;
  logic dec_r_valid, dec_flush;
  logic [NT-1:0] z, zv;
  logic [1:0] best [NT];
  logic [3:0][5:0] metric [NT];
  int checks = 0, failures = 0;

  viterbi_codec_top t0 (.clk, .rst_n, .enc_u, .enc_u_valid,
    .enc_u_ready(enc_u_ready[0]), .enc_v(enc_v[0]), .enc_ser_bit(ser_bit[0]),
    .enc_ser_valid(ser_valid[0]), .enc_ser_first(ser_first[0]), .enc_state(enc_state[0]),
    .dec_r, .dec_r_valid, .dec_flush, .dec_z(z[0]), .dec_z_valid(zv[0]),
    .dec_best_state(best[0]), .dec_metric(metric[0]));
  viterbi_codec_top #(.REDUCED(1'b1)) t1 (.clk, .rst_n, .enc_u, .enc_u_valid,
    .enc_u_ready(enc_u_ready[1]), .enc_v(enc_v[1]), .enc_ser_bit(ser_bit[1]),
    .enc_ser_valid(ser_valid[1]), .enc_ser_first(ser_first[1]), .enc_state(enc_state[1]),
    .dec_r, .dec_r_valid, .dec_flush, .dec_z(z[1]), .dec_z_valid(zv[1]),
    .dec_best_state(best[1]), .dec_metric(metric[1]));
  viterbi_codec_top #(.TRACE_FROM_BEST(1'b0)) t2 (.clk, .rst_n, .enc_u, .enc_u_valid,
    .enc_u_ready(enc_u_ready[2]), .enc_v(enc_v[2]), .enc_ser_bit(ser_bit[2]),
    .enc_ser_valid(ser_valid[2]), .enc_ser_first(ser_first[2]), .enc_state(enc_state[2]),
    .dec_r, .dec_r_valid, .dec_flush, .dec_z(z[2]), .dec_z_valid(zv[2]),
    .dec_best_state(best[2]), .dec_metric(metric[2]));

  always #5 clk = ~clk;

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

  // mechanism counters
  int n_frames, n_y0, n_y1, n_best_nz, n_renorm, n_unreach, n_flush, n_chan_err;
  int n_out [NT];

  vit_ref     rm [NT];
  int         exp_bits [NT][$];
  int         got_bits [NT][$];
  int         msg [$];
  logic [1:0] frames [$];
  int         n_adv;
  bit         sending_done;

  // Serial output of t0 paired into frames; t1/t2 must match bit for bit.
  logic first_bit;
  always @(negedge clk) begin
    if (rst_n && ser_valid[0]) begin
      check(ser_valid[1] == ser_valid[0] && ser_valid[2] == ser_valid[0] &&
            ser_bit[1] == ser_bit[0] && ser_bit[2] == ser_bit[0], "encoders agree");
      if (ser_first[0]) first_bit = ser_bit[0];
      else begin
        frames.push_back({first_bit, ser_bit[0]});
        n_frames++;
      end
    end
  end

  // Decoded outputs and their timing.
  always @(negedge clk) begin
    if (rst_n)
      for (int d = 0; d < NT; d++)
        if (zv[d]) begin
          check(n_adv == LAT[d] + n_out[d],
                $sformatf("t%0d: bit %0d after time unit %0d, expected %0d",
                          d, n_out[d], n_adv, LAT[d] + n_out[d]));
          got_bits[d].push_back(int'(z[d]));
          n_out[d]++;
        end
  end

  task automatic time_unit(input bit erase, input logic [1:0] f);
    dec_r = f; dec_r_valid = !erase; dec_flush = erase;
    for (int d = 0; d < NT; d++) begin
      int b;
      rm[d].step(erase, int'(f));
      b = rm[d].decode();
      if (b >= 0) exp_bits[d].push_back(b);
    end
    #1;
    // observe the selection unit of t0 in this time unit
    for (int k = 0; k < 4; k++)
      if (rm[0].y_def[k]) begin
        if (t0.u_dec.y_sel[k]) n_y1++; else n_y0++;
      end
    if (best[0] != 0) n_best_nz++;
    if (t0.u_dec.u_sel.min_c != 0) n_renorm++;
    for (int k = 0; k < 4; k++) if (metric[0][k] == '1) n_unreach++;
    @(posedge clk);
    n_adv++;
    #1 dec_r_valid = 1'b0; dec_flush = 1'b0;
    if (erase) n_flush++;
  endtask

  initial begin
    int bit_err;
    rst_n = 1'b0; enc_u = 1'b0; enc_u_valid = 1'b0;
    dec_r = '0; dec_r_valid = 1'b0; dec_flush = 1'b0;
    rm[0] = new(2, 'b111, 'b101, 10, 1'b1);
    rm[1] = new(2, 'b111, 'b101, 10, 1'b1);
    rm[2] = new(2, 'b111, 'b101, 10, 1'b0);
    n_adv = 0; sending_done = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    fork
      // information bits into the encoders, as fast as they are accepted
      begin
        int sent;
        sent = 0;
        while (sent < NMSG) begin
          bit acc;
          enc_u = 1'($urandom); enc_u_valid = 1'b1;
          #1 acc = enc_u_ready[0];
          @(posedge clk);
          if (acc) begin
            check(enc_u_ready[1] && enc_u_ready[2], "encoders ready together");
            msg.push_back(int'(enc_u));
            sent++;
          end
          #1;
        end
        enc_u_valid = 1'b0;
        sending_done = 1'b1;
      end
      // channel and decoders
      begin
        int taken;
        taken = 0;
        while (taken < NMSG) begin
          if (frames.size() > 0) begin
            logic [1:0] f;
            f = frames.pop_front();
            for (int b = 0; b < 2; b++)
              if ($urandom % 33 == 0) begin f ^= 2'(1 << b); n_chan_err++; end
            taken++;
            time_unit(1'b0, f);
          end else begin
            @(posedge clk); #1;
          end
        end
      end
    join
    for (int t = 0; t < 19; t++) time_unit(1'b1, 2'b00);
    @(posedge clk); #1;

    for (int d = 0; d < NT; d++) begin
      check(got_bits[d].size() == n_adv - LAT[d] + 1,
            $sformatf("t%0d: %0d bits out, expected %0d", d, got_bits[d].size(), n_adv - LAT[d] + 1));
      for (int i = 0; i < got_bits[d].size() && i < exp_bits[d].size(); i++)
        check(got_bits[d][i] == exp_bits[d][i],
              $sformatf("t%0d bit %0d: %0d vs model %0d", d, i, got_bits[d][i], exp_bits[d][i]));
    end
    bit_err = 0;
    for (int i = 0; i < NMSG && i < got_bits[0].size(); i++)
      if (got_bits[0][i] != msg[i]) bit_err++;
    $display("%0d frames, %0d channel errors, %0d decoded bits wrong", n_frames, n_chan_err, bit_err);
    $display("mechanisms: y0=%0d y1=%0d best!=S0=%0d renorm=%0d unreachable=%0d flush=%0d out=%0d/%0d/%0d",
             n_y0, n_y1, n_best_nz, n_renorm, n_unreach, n_flush, n_out[0], n_out[1], n_out[2]);
    check(n_frames == NMSG, "every bit serialised as one frame");
    check(n_y0 > 0, "survivor from the LSB-0 predecessor seen");
    check(n_y1 > 0, "survivor from the LSB-1 predecessor seen");
    check(n_best_nz > 0, "best state other than S0 seen");
    check(n_renorm > 0, "metric renormalisation seen");
    check(n_unreach > 0, "unreachable start-up states seen");
    check(n_flush > 0, "erased flush time units seen");
    check(n_chan_err > 0, "channel errors seen");
    for (int d = 0; d < NT; d++) check(n_out[d] >= NMSG, $sformatf("t%0d decoded the whole message", d));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
