// tb_convolver_top: end-to-end test of all nine convolvers at default sizes.
//
// Nine processes run concurrently, one per convolver, each with its own
// reference model written here:
//   NTT   - random kernels and inputs mod 31 streamed with gaps; the top
//           derives g from ntt_h; results must be the cyclic convolution
//           mod 31, 3 cycles after the input;
//   NTT2  - the same for the radix -2 transform of length 10 (ntt2_*);
//   RT-P  - random 8-bit kernel rt_h and inputs streamed; cyclic convolution,
//           14 cycles after the input;
//   DP    - direct parallel, 4 cycles after the input;
//   RT-S  - bit-serial RT on the same rt_h, inputs taken on in_ready, one
//           every 20 cycles, results 35 cycles after acceptance;
//   DS    - bit-serial direct mesh, one input every 19 cycles, results 26
//           cycles after acceptance;
//   RT-M  - single-multiplier RT on the same rt_h, 5 busy cycles per result;
//   DM    - circulating-tap direct convolver, 4 serial outputs per start;
//   OS    - overlap-save stream with gaps, linear convolution, 2 cycles.
// The mechanisms each design relies on are counted and every one must occur:
// modular wrap-around and all-ones (negative zero) inputs in the NTT,
// back-to-back issue in every pipelined design, kernel reloads with the
// pipelines drained, start pulses ignored while busy, circulating-tap runs,
// and blocks whose outputs depend on the previous block's overlap samples.
module tb_convolver_top;
  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst = 1;

  logic       ntt_in_valid = 0;
  logic [4:0] ntt_x [5];
  logic [4:0] ntt_h [5];
  logic       ntt_out_valid;
  logic [4:0] ntt_y [5];
  logic       ntt2_in_valid = 0;
  logic [4:0] ntt2_x [10];
  logic [4:0] ntt2_h [10];
  logic       ntt2_out_valid;
  logic [4:0] ntt2_y [10];
  logic signed [7:0]  rt_h [4];
  logic               rtp_in_valid = 0;
  logic signed [7:0]  rtp_x [4];
  logic               rtp_out_valid;
  logic signed [17:0] rtp_y [4];
  logic               rts_in_valid = 0;
  logic               rts_in_ready;
  logic signed [7:0]  rts_x [4];
  logic               rts_out_valid;
  logic signed [17:0] rts_y [4];
  logic               dp_in_valid = 0;
  logic signed [7:0]  dp_x [4];
  logic signed [7:0]  dp_h [4];
  logic               dp_out_valid;
  logic signed [17:0] dp_y [4];
  logic               ds_in_valid = 0;
  logic               ds_in_ready;
  logic signed [7:0]  ds_x [4];
  logic signed [7:0]  ds_h [4];
  logic               ds_out_valid;
  logic signed [17:0] ds_y [4];
  logic               rtm_start = 0;
  logic signed [7:0]  rtm_x [4];
  logic               rtm_busy;
  logic               rtm_done;
  logic signed [17:0] rtm_y [4];
  logic               dm_start = 0;
  logic signed [7:0]  dm_x [4];
  logic signed [7:0]  dm_h [4];
  logic               dm_busy;
  logic               dm_y_valid;
  logic [1:0]         dm_y_idx;
  logic signed [17:0] dm_y;
  logic               os_in_valid = 0;
  logic signed [7:0]  os_x [4];
  logic signed [7:0]  os_h [3];
  logic               os_out_valid;
  logic signed [17:0] os_y [4];

  convolver_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_ntt = 0, n_ntt_wrap = 0, n_ntt_negzero = 0, n_ntt_b2b = 0;
  int n_ntt2 = 0, n_ntt2_wrap = 0, n_ntt2_negzero = 0, n_ntt2_b2b = 0;
  int n_rtp = 0, n_rtp_b2b = 0, n_kernel_reload = 0;
  int n_dp = 0, n_dp_b2b = 0;
  int n_rtm = 0, n_rtm_ignored = 0;
  int n_rts = 0, n_rts_b2b = 0;
  int n_ds = 0, n_ds_b2b = 0;
  int n_dm = 0, n_dm_ignored = 0;
  int n_os = 0, n_os_overlap = 0, n_os_gap = 0;

  typedef struct { int stamp; int yv[10]; } exp_t;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
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

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endfunction

  // ---------------- NTT ----------------
  task automatic run_ntt(int n);
    exp_t q[$];
    int hv [5];
    bit prev;
    prev = 0;
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      if (ntt_out_valid) begin
        exp_t e;
        e = q.pop_front();
        check(cycle - e.stamp == 3, "ntt latency");
        for (int k = 0; k < 5; k++) check(int'(ntt_y[k]) == e.yv[k], "ntt value");
        n_ntt++;
      end
      if (t % 400 == 0) begin
        ntt_in_valid = 0;
        repeat (4) begin
          @(negedge clk);
          if (ntt_out_valid) begin
            exp_t e;
            e = q.pop_front();
            for (int k = 0; k < 5; k++) check(int'(ntt_y[k]) == e.yv[k], "ntt value");
            n_ntt++;
          end
        end
        for (int j = 0; j < 5; j++) begin
          hv[j] = $urandom_range(0, 31);
          ntt_h[j] = 5'(hv[j]);
        end
        prev = 0;
        continue;
      end
      ntt_in_valid = ($urandom_range(0, 4) != 0);
      for (int j = 0; j < 5; j++) ntt_x[j] = 5'($urandom);
      if (ntt_in_valid) begin
        exp_t e;
        e.stamp = cycle;
        for (int k = 0; k < 5; k++) begin
          int acc;
          acc = 0;
          for (int i = 0; i < 5; i++) acc += (hv[i] % 31) * (int'(ntt_x[(k - i + 5) % 5]) % 31);
          if (acc >= 31) n_ntt_wrap++;
          e.yv[k] = acc % 31;
        end
        for (int j = 0; j < 5; j++) if (ntt_x[j] == 5'h1f || hv[j] == 31) n_ntt_negzero++;
        q.push_back(e);
        if (prev) n_ntt_b2b++;
      end
      prev = ntt_in_valid;
    end
    repeat (4) begin
      @(negedge clk);
      ntt_in_valid = 0;
      if (ntt_out_valid) begin
        exp_t e;
        e = q.pop_front();
        for (int k = 0; k < 5; k++) check(int'(ntt_y[k]) == e.yv[k], "ntt value");
        n_ntt++;
      end
    end
    check(q.size() == 0, "ntt drained");
  endtask

  // ---------------- NTT, radix -2, length 10 ----------------
  task automatic run_ntt2(int n);
    exp_t q[$];
    int hv [10];
    bit prev;
    prev = 0;
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      if (ntt2_out_valid) begin
        exp_t e;
        e = q.pop_front();
        check(cycle - e.stamp == 3, "ntt2 latency");
        for (int k = 0; k < 10; k++) check(int'(ntt2_y[k]) == e.yv[k], "ntt2 value");
        n_ntt2++;
      end
      if (t % 400 == 0) begin
        ntt2_in_valid = 0;
        repeat (4) begin
          @(negedge clk);
          if (ntt2_out_valid) begin
            exp_t e;
            e = q.pop_front();
            for (int k = 0; k < 10; k++) check(int'(ntt2_y[k]) == e.yv[k], "ntt2 value");
            n_ntt2++;
          end
        end
        for (int j = 0; j < 10; j++) begin
          hv[j] = $urandom_range(0, 31);
          ntt2_h[j] = 5'(hv[j]);
        end
        prev = 0;
        continue;
      end
      ntt2_in_valid = ($urandom_range(0, 4) != 0);
      for (int j = 0; j < 10; j++) ntt2_x[j] = 5'($urandom);
      if (ntt2_in_valid) begin
        exp_t e;
        e.stamp = cycle;
        for (int k = 0; k < 10; k++) begin
          int acc;
          acc = 0;
          for (int i = 0; i < 10; i++) acc += (hv[i] % 31) * (int'(ntt2_x[(k - i + 10) % 10]) % 31);
          if (acc >= 31) n_ntt2_wrap++;
          e.yv[k] = acc % 31;
        end
        for (int j = 0; j < 10; j++) if (ntt2_x[j] == 5'h1f || hv[j] == 31) n_ntt2_negzero++;
        q.push_back(e);
        if (prev) n_ntt2_b2b++;
      end
      prev = ntt2_in_valid;
    end
    repeat (4) begin
      @(negedge clk);
      ntt2_in_valid = 0;
      if (ntt2_out_valid) begin
        exp_t e;
        e = q.pop_front();
        for (int k = 0; k < 10; k++) check(int'(ntt2_y[k]) == e.yv[k], "ntt2 value");
        n_ntt2++;
      end
    end
    check(q.size() == 0, "ntt2 drained");
  endtask

  // ---------------- RT parallel, direct parallel, RT multiplexed ----------------
  int rt_hv [4];

  task automatic cyc4(input int hv[4], input int xv[4], output int yv[10]);
    for (int k = 0; k < 4; k++) begin
      yv[k] = 0;
      for (int i = 0; i < 4; i++) yv[k] += hv[i] * xv[(k - i + 4) % 4];
    end
    yv[4] = 0;
  endtask

  task automatic run_rtp_dp(int n);
    exp_t qr[$];
    exp_t qd[$];
    int dhv [4];
    bit prev_r, prev_d;
    prev_r = 0;
    prev_d = 0;
    for (int j = 0; j < 4; j++) begin
      dhv[j] = rnd8();
      dp_h[j] = 8'(dhv[j]);
    end
    for (int t = 0; t < n; t++) begin
      int xv [4];
      @(negedge clk);
      if (rtp_out_valid) begin
        exp_t e;
        e = qr.pop_front();
        check(cycle - e.stamp == 14, "rtp latency");
        for (int k = 0; k < 4; k++) check(int'(rtp_y[k]) == e.yv[k], "rtp value");
        n_rtp++;
      end
      if (dp_out_valid) begin
        exp_t e;
        e = qd.pop_front();
        check(cycle - e.stamp == 4, "dp latency");
        for (int k = 0; k < 4; k++) check(int'(dp_y[k]) == e.yv[k], "dp value");
        n_dp++;
      end
      rtp_in_valid = ($urandom_range(0, 3) != 0);
      dp_in_valid  = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 4; j++) begin
        xv[j] = rnd8();
        rtp_x[j] = 8'(xv[j]);
        dp_x[j] = 8'(xv[j]);
      end
      if (rtp_in_valid) begin
        exp_t e;
        e.stamp = cycle;
        cyc4(rt_hv, xv, e.yv);
        qr.push_back(e);
        if (prev_r) n_rtp_b2b++;
      end
      if (dp_in_valid) begin
        exp_t e;
        e.stamp = cycle;
        cyc4(dhv, xv, e.yv);
        qd.push_back(e);
        if (prev_d) n_dp_b2b++;
      end
      prev_r = rtp_in_valid;
      prev_d = dp_in_valid;
    end
    repeat (15) begin
      @(negedge clk);
      rtp_in_valid = 0;
      dp_in_valid = 0;
      if (rtp_out_valid) begin
        exp_t e;
        e = qr.pop_front();
        for (int k = 0; k < 4; k++) check(int'(rtp_y[k]) == e.yv[k], "rtp value");
        n_rtp++;
      end
      if (dp_out_valid) begin
        exp_t e;
        e = qd.pop_front();
        for (int k = 0; k < 4; k++) check(int'(dp_y[k]) == e.yv[k], "dp value");
        n_dp++;
      end
    end
    check(qr.size() == 0 && qd.size() == 0, "rtp/dp drained");
  endtask

  task automatic run_rts(int n);
    exp_t q[$];
    int last_acc;
    last_acc = -1000;
    for (int t = 0; t < n; t++) begin
      int xv [4];
      @(negedge clk);
      if (rts_out_valid) begin
        exp_t e;
        e = q.pop_front();
        check(cycle - e.stamp == 35, "rts latency");
        for (int k = 0; k < 4; k++) check(int'(rts_y[k]) == e.yv[k], "rts value");
        n_rts++;
      end
      rts_in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 4; j++) begin
        xv[j] = rnd8();
        rts_x[j] = 8'(xv[j]);
      end
      #1;
      if (rts_in_valid && rts_in_ready) begin
        exp_t e;
        e.stamp = cycle;
        cyc4(rt_hv, xv, e.yv);
        q.push_back(e);
        check(cycle - last_acc >= 20, "rts period");
        if (cycle - last_acc == 20) n_rts_b2b++;
        last_acc = cycle;
      end
    end
    repeat (40) begin
      @(negedge clk);
      rts_in_valid = 0;
      if (rts_out_valid) begin
        exp_t e;
        e = q.pop_front();
        for (int k = 0; k < 4; k++) check(int'(rts_y[k]) == e.yv[k], "rts value");
        n_rts++;
      end
    end
    check(q.size() == 0, "rts drained");
  endtask

  task automatic run_ds(int n);
    exp_t q[$];
    int hv [4];
    int last_acc;
    last_acc = -1000;
    for (int j = 0; j < 4; j++) begin
      hv[j] = rnd8();
      ds_h[j] = 8'(hv[j]);
    end
    for (int t = 0; t < n; t++) begin
      int xv [4];
      @(negedge clk);
      if (ds_out_valid) begin
        exp_t e;
        e = q.pop_front();
        check(cycle - e.stamp == 26, "ds latency");
        for (int k = 0; k < 4; k++) check(int'(ds_y[k]) == e.yv[k], "ds value");
        n_ds++;
      end
      ds_in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 4; j++) begin
        xv[j] = rnd8();
        ds_x[j] = 8'(xv[j]);
      end
      #1;
      if (ds_in_valid && ds_in_ready) begin
        exp_t e;
        e.stamp = cycle;
        cyc4(hv, xv, e.yv);
        q.push_back(e);
        check(cycle - last_acc >= 19, "ds period");
        if (cycle - last_acc == 19) n_ds_b2b++;
        last_acc = cycle;
      end
    end
    repeat (30) begin
      @(negedge clk);
      ds_in_valid = 0;
      if (ds_out_valid) begin
        exp_t e;
        e = q.pop_front();
        for (int k = 0; k < 4; k++) check(int'(ds_y[k]) == e.yv[k], "ds value");
        n_ds++;
      end
    end
    check(q.size() == 0, "ds drained");
  endtask

  task automatic run_rtm(int runs);
    for (int r = 0; r < runs; r++) begin
      int xv [4];
      int ev [10];
      int busy_n;
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        xv[j] = rnd8();
        rtm_x[j] = 8'(xv[j]);
      end
      cyc4(rt_hv, xv, ev);
      rtm_start = 1;
      @(negedge clk);
      rtm_start = 0;
      busy_n = 0;
      while (rtm_busy && busy_n < 20) begin
        if (busy_n == 1 && $urandom_range(0, 1) == 1) begin
          rtm_start = 1;
          n_rtm_ignored++;
        end
        @(negedge clk);
        rtm_start = 0;
        busy_n++;
      end
      check(busy_n == 5, "rtm iterations");
      check(rtm_done == 1'b1, "rtm done");
      for (int k = 0; k < 4; k++) check(int'(rtm_y[k]) == ev[k], "rtm value");
      n_rtm++;
      @(negedge clk);
      check(!rtm_busy, "rtm ignored start");
    end
  endtask

  task automatic run_dm(int runs);
    for (int r = 0; r < runs; r++) begin
      int xv [4];
      int hv [4];
      int ev [10];
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        xv[j] = rnd8();
        hv[j] = rnd8();
        dm_x[j] = 8'(xv[j]);
        dm_h[j] = 8'(hv[j]);
      end
      cyc4(hv, xv, ev);
      dm_start = 1;
      @(negedge clk);
      dm_start = 0;
      for (int t = 0; t < 4; t++) begin
        if (t == 2 && $urandom_range(0, 1) == 1) begin
          dm_start = 1;
          n_dm_ignored++;
        end
        @(negedge clk);
        dm_start = 0;
        check(dm_y_valid && int'(dm_y_idx) == t, "dm sequencing");
        check(int'(dm_y) == ev[t], "dm value");
      end
      check(!dm_busy, "dm end");
      n_dm++;
    end
  endtask

  task automatic run_os(int n);
    exp_t q[$];
    int hv [3];
    int stream [$];
    for (int i = 0; i < 3; i++) begin
      hv[i] = rnd8();
      os_h[i] = 8'(hv[i]);
    end
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      if (os_out_valid) begin
        exp_t e;
        e = q.pop_front();
        check(cycle - e.stamp == 2, "os latency");
        for (int k = 0; k < 4; k++) check(int'(os_y[k]) == e.yv[k], "os value");
        n_os++;
      end
      os_in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 4; j++) os_x[j] = 8'(rnd8());
      if (os_in_valid) begin
        exp_t e;
        bit ovl;
        ovl = 0;
        e.stamp = cycle;
        for (int j = 0; j < 4; j++) stream.push_back(int'(os_x[j]));
        for (int k = 0; k < 4; k++) begin
          int nn;
          nn = stream.size() - 4 + k;
          e.yv[k] = 0;
          for (int i = 0; i < 3; i++) begin
            if (nn - i >= 0) begin
              e.yv[k] += hv[i] * stream[nn - i];
              if (k - i < 0 && stream[nn - i] != 0 && hv[i] != 0) ovl = 1;
            end
          end
        end
        if (ovl) n_os_overlap++;
        q.push_back(e);
      end else if (stream.size() > 0) begin
        n_os_gap++;
      end
    end
    repeat (3) begin
      @(negedge clk);
      os_in_valid = 0;
      if (os_out_valid) begin
        exp_t e;
        e = q.pop_front();
        for (int k = 0; k < 4; k++) check(int'(os_y[k]) == e.yv[k], "os value");
        n_os++;
      end
    end
    check(q.size() == 0, "os drained");
  endtask

  task automatic new_rt_kernel();
    for (int j = 0; j < 4; j++) begin
      rt_hv[j] = rnd8();
      rt_h[j] = 8'(rt_hv[j]);
    end
    n_kernel_reload++;
  endtask

  initial begin
    for (int j = 0; j < 5; j++) begin
      ntt_x[j] = '0;
      ntt_h[j] = '0;
    end
    for (int j = 0; j < 10; j++) begin
      ntt2_x[j] = '0;
      ntt2_h[j] = '0;
    end
    for (int j = 0; j < 4; j++) begin
      rtp_x[j] = '0;
      rtm_x[j] = '0;
      rts_x[j] = '0;
      ds_x[j] = '0;
      ds_h[j] = '0;
      dp_x[j] = '0;
      dp_h[j] = '0;
      dm_x[j] = '0;
      dm_h[j] = '0;
      os_x[j] = '0;
    end
    for (int i = 0; i < 3; i++) os_h[i] = '0;
    new_rt_kernel();
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      run_ntt(2000);
      run_ntt2(2000);
      begin
        for (int r = 0; r < 4; r++) begin
          // RT kernel is shared: reload it only while both RT convolvers are idle
          new_rt_kernel();
          fork
            run_rtp_dp(400);
            run_rtm(60);
            run_rts(400);
          join
        end
      end
      run_dm(300);
      run_ds(1500);
      run_os(2000);
    join
    $display("ntt2=%0d wrap=%0d negzero=%0d b2b=%0d", n_ntt2, n_ntt2_wrap, n_ntt2_negzero, n_ntt2_b2b);
    $display("ntt=%0d wrap=%0d negzero=%0d b2b=%0d | rtp=%0d b2b=%0d reload=%0d | dp=%0d b2b=%0d | rts=%0d b2b=%0d | ds=%0d b2b=%0d | rtm=%0d ignored=%0d | dm=%0d ignored=%0d | os=%0d overlap=%0d gap=%0d",
             n_ntt, n_ntt_wrap, n_ntt_negzero, n_ntt_b2b, n_rtp, n_rtp_b2b, n_kernel_reload,
             n_dp, n_dp_b2b, n_rts, n_rts_b2b, n_ds, n_ds_b2b, n_rtm, n_rtm_ignored, n_dm, n_dm_ignored, n_os, n_os_overlap, n_os_gap);
    check(n_ntt > 0 && n_ntt_wrap > 0 && n_ntt_negzero > 0 && n_ntt_b2b > 0, "ntt mechanisms");
    check(n_ntt2 > 0 && n_ntt2_wrap > 0 && n_ntt2_negzero > 0 && n_ntt2_b2b > 0, "ntt2 mechanisms");
    check(n_rtp > 0 && n_rtp_b2b > 0 && n_kernel_reload > 1, "rtp mechanisms");
    check(n_dp > 0 && n_dp_b2b > 0, "dp mechanisms");
    check(n_rts > 0 && n_rts_b2b > 0, "rts mechanisms");
    check(n_ds > 0 && n_ds_b2b > 0, "ds mechanisms");
    check(n_rtm > 0 && n_rtm_ignored > 0, "rtm mechanisms");
    check(n_dm > 0 && n_dm_ignored > 0, "dm mechanisms");
    check(n_os > 0 && n_os_overlap > 0 && n_os_gap > 0, "os mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
