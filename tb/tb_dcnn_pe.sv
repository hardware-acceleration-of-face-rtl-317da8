// tb_dcnn_pe: random receptive fields of random length through one PE; the
// result (bias + sum of products, shifted to 7 fraction bits, optional ReLU,
// saturated to 18 bits) is computed here and compared, and the result must
// come exactly one cycle after the field's last pixel. Fields follow each
// other without gaps.
module tb_dcnn_pe;
  import dcnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_first = 0, in_last = 0, relu = 0;
  data_t in_data = '0, bias = '0;
  weight_t in_weight = '0;
  logic out_valid;
  data_t out_data;

  dcnn_pe dut (.*);

  longint expect_q[$];

  function automatic data_t ref_out(longint acc, logic r);
    longint s = acc >>> FRAC;
    if (r && s < 0) s = 0;
    if (s > 131071) s = 131071;
    if (s < -131072) s = -131072;
    return data_t'(s);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 300; f++) begin
      int n;
      longint acc;
      logic r;
      data_t bb, d;
      weight_t w;
      n  = 1 + $urandom_range(0, 40);
      r  = 1'($urandom_range(0, 1));
      bb = data_t'($urandom);
      if (f % 3 == 0) bb = data_t'($urandom_range(0, 255)); // small values as well as large ones
      acc = longint'(bb) <<< FRAC;
      for (int i = 0; i < n; i++) begin
        d = (f % 2) ? data_t'($urandom) : data_t'(int'($urandom_range(0, 2047)) - 1024);
        w = weight_t'($urandom);
        acc += longint'(d) * longint'(w);
        in_valid <= 1; in_first <= (i == 0); in_last <= (i == n - 1);
        in_data <= d; in_weight <= w; bias <= bb; relu <= r;
        @(posedge clk);
      end
      expect_q.push_back(longint'(ref_out(acc, r)));
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 0; in_first <= 0; in_last <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0; in_last <= 0;
    repeat (3) @(posedge clk);
    if (expect_q.size() != 0) begin failures++; $display("missing %0d results", expect_q.size()); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a result must appear exactly one cycle after in_last
  logic last_d = 0;
  always @(posedge clk) begin
    last_d <= in_valid && in_last;
    if (rst_n) begin
      if (out_valid !== last_d) begin failures++; checks++; $display("out_valid timing error"); end
      if (out_valid) begin
        longint e;
        e = expect_q.pop_front();
        checks++;
        if (longint'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("PE mismatch got %0d exp %0d", out_data, e);
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
