// tb_direct_multiplexed: checks the direct convolver with circulating taps.
//
// Each run pulses start with random x and h (extremes included). Outputs
// y(0) .. y(3) must appear on the 4 cycles right after start, one per cycle,
// with y_idx counting 0 .. 3 and each value equal to the cyclic convolution
// sum_i h(i) x((t-i) mod 4) computed here. busy must cover exactly those 4
// cycles and a start pulse while busy must be ignored.
module tb_direct_multiplexed;
  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst = 1;
  logic start = 0;
  logic signed [7:0] x [4];
  logic signed [7:0] h [4];
  logic busy;
  logic y_valid;
  logic [1:0] y_idx;
  logic signed [17:0] y_out;

  direct_multiplexed dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    int hv [4];
    int xv [4];
    int ev [4];
    for (int j = 0; j < 4; j++) begin
      x[j] = '0;
      h[j] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 500; run++) begin
      for (int j = 0; j < 4; j++) begin
        hv[j] = rnd8();
        xv[j] = rnd8();
        x[j]  = 8'(xv[j]);
        h[j]  = 8'(hv[j]);
      end
      for (int k = 0; k < 4; k++) begin
        ev[k] = 0;
        for (int i = 0; i < 4; i++) ev[k] += hv[i] * xv[(k - i + 4) % 4];
      end
      start = 1;
      @(negedge clk);
      start = 0;
      for (int j = 0; j < 4; j++) begin
        x[j] = 8'($urandom);
        h[j] = 8'($urandom);
      end
      for (int t = 0; t < 4; t++) begin
        checks++;
        if (!busy) begin
          failures++;
          $display("run %0d: not busy in iteration %0d", run, t);
        end
        if (t == 1) start = 1;   // ignored while busy
        @(negedge clk);
        start = 0;
        checks += 3;
        if (!y_valid) begin
          failures++;
          $display("run %0d: no y_valid at %0d", run, t);
        end
        if (int'(y_idx) != t) begin
          failures++;
          $display("run %0d: y_idx %0d exp %0d", run, y_idx, t);
        end
        if (int'(y_out) != ev[t]) begin
          failures++;
          $display("run %0d: y(%0d)=%0d exp %0d", run, t, y_out, ev[t]);
        end
      end
      checks++;
      if (busy) begin
        failures++;
        $display("run %0d: still busy", run);
      end
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        checks++;
        if (y_valid || busy) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
