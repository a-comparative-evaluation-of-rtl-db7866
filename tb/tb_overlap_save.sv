// tb_overlap_save: checks the overlap-save linear convolver on a stream.
//
// Blocks of 4 random samples (extremes included) are streamed with random
// gaps in in_valid. The testbench keeps the whole sample stream (zero before
// the first sample) and expects, for every accepted block, the 4 outputs
// y(n) = sum_{i<3} h(i) x(n-i) of that block exactly 2 cycles later. Gaps
// between blocks check that the overlap registers advance only on valid
// blocks; back-to-back blocks check the one-block-per-clock rate.
module tb_overlap_save;
  localparam int LAT = 2;
  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int b2b = 0;
  logic clk = 0;
  logic rst = 1;
  logic in_valid = 0;
  logic signed [7:0] x [4];
  logic signed [7:0] h [3];
  logic out_valid;
  logic signed [17:0] y [4];
  int hv [3];
  int stream [$];

  typedef struct { int stamp; int yv[4]; } exp_t;
  exp_t q[$];

  overlap_save dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd8();
    case ($urandom_range(0, 5))
      0:       return -128;
      1:       return 127;
      default: return $signed(8'($urandom));
    endcase
  endfunction

  initial begin
    bit prev;
    int gaps;
    prev = 0;
    gaps = 0;
    for (int i = 0; i < 3; i++) begin
      hv[i] = rnd8();
      h[i]  = 8'(hv[i]);
    end
    for (int j = 0; j < 4; j++) x[j] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      cycle++;
      if (out_valid) begin
        if (q.size() == 0) begin
          failures++;
          $display("unexpected out_valid");
        end else begin
          exp_t e;
          e = q.pop_front();
          checks++;
          if (cycle - e.stamp != LAT) begin
            failures++;
            $display("latency %0d", cycle - e.stamp);
          end
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (int'(y[k]) != e.yv[k]) begin
              failures++;
              $display("cycle %0d y[%0d]=%0d exp %0d", cycle, k, y[k], e.yv[k]);
            end
          end
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 4; j++) x[j] = 8'(rnd8());
      if (in_valid) begin
        exp_t e;
        e.stamp = cycle;
        for (int j = 0; j < 4; j++) stream.push_back(int'(x[j]));
        for (int k = 0; k < 4; k++) begin
          int n;
          n = stream.size() - 4 + k;
          e.yv[k] = 0;
          for (int i = 0; i < 3; i++) if (n - i >= 0) e.yv[k] += hv[i] * stream[n - i];
        end
        q.push_back(e);
        if (prev) b2b++;
      end else if (stream.size() > 0) begin
        gaps++;
      end
      prev = in_valid;
    end
    checks++;
    if (b2b == 0 || gaps == 0 || q.size() > LAT) begin
      failures++;
      $display("b2b=%0d gaps=%0d pending=%0d", b2b, gaps, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
