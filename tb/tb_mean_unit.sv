// tb_mean_unit: streams two random 7x5 images (with random gaps on in_valid)
// through the mean computation unit and checks every output data point
// against a reference 3x3 neighbour sum with border replication: x_k, xbar_k
// (8.3), first/last flags, the number of outputs, the number of flush beats
// (IMG_W + 1 cycles with in_ready low per image) and that the output of pixel
// p appears one cycle after pixel p + IMG_W + 1 was accepted.
module tb_mean_unit;
  import fcm_pkg::*;

  localparam int W = 7, H = 5, NP = W * H;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic in_ready;
  logic [7:0] in_pix;
  pix_t out;
  logic [7:0] img [2][NP];
  int n_out, frame_out, flush_cycles, acc_cnt;
  int cyc = 0, nbeat = 0;
  int beat_cyc [NP + W + 1];

  mean_unit #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pix, .out);

  always #5 clk = ~clk;

  function automatic int ref_sum(input int f, input int p);
    int r, c, rr, cc, s;
    r = p / W; c = p % W; s = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (dr != 0 || dc != 0) begin
          rr = r + dr; cc = c + dc;
          if (rr < 0) rr = 0;
          if (rr >= H) rr = H - 1;
          if (cc < 0) cc = 0;
          if (cc >= W) cc = W - 1;
          s += int'(img[f][rr * W + cc]);
        end
    return s;
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && out.valid) begin
      checks++;
      if (out.x != img[frame_out][n_out] || int'(out.xbar) != ref_sum(frame_out, n_out) ||
          out.first != (n_out == 0) || out.last != (n_out == NP - 1)) begin
        failures++;
        $display("FAIL f=%0d p=%0d x=%0d xbar=%0d ref=%0d", frame_out, n_out, out.x, out.xbar, ref_sum(frame_out, n_out));
      end
      // latency: pixel p leaves one cycle after beat p + W + 1
      checks++;
      if (beat_cyc[n_out + W + 1] != cyc - 1) begin
        failures++;
        $display("FAIL latency p=%0d", n_out);
      end
      n_out++;
      if (n_out == NP) begin n_out = 0; frame_out++; end
    end
    if (rst_n && !in_ready) flush_cycles++;
    if (rst_n && ((in_valid && in_ready) || !in_ready)) begin
      beat_cyc[nbeat] = cyc;
      nbeat = (nbeat == NP + W) ? 0 : nbeat + 1;
    end
    cyc++;
  end

  initial begin
    for (int f = 0; f < 2; f++) for (int p = 0; p < NP; p++) img[f][p] = 8'($urandom);
    n_out = 0; frame_out = 0; flush_cycles = 0; acc_cnt = 0;
    in_valid = 0; in_pix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    for (int f = 0; f < 2; f++) begin
      for (int p = 0; p < NP; p++) begin
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(posedge clk); #1; end
        in_valid = 1; in_pix = img[f][p];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        acc_cnt = (p + 1) % NP == 0 ? NP : p + 1;
        #1;
      end
      in_valid = 0;
      while (!in_ready) @(posedge clk);
      @(posedge clk); #1;
      acc_cnt = 0;
    end
    repeat (W + 5) @(posedge clk);
    checks++;
    if (frame_out != 2 || n_out != 0) begin failures++; $display("FAIL outputs frames=%0d n=%0d", frame_out, n_out); end
    checks++;
    if (flush_cycles != 2 * (W + 1)) begin failures++; $display("FAIL flush cycles %0d", flush_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
