// tb_workload_datasets: runs the classifier, at its default sizes, over flow
// streams of the size of the two evaluation data sets: 77,303 flows of 5
// classes and 339,061 flows of 4 classes, each with 6 features and 10 % of
// the flows also given to the host as labeled instances
// (simultaneous-test-and-train: flows arrive back to back).
//
// Real traces are not available here, so the flows are synthetic: each class
// is a cloud around a centre, and the centres drift slowly so that the model
// has to keep learning (new clusters, updates, reconstruction). For each
// stream the testbench reports total clocks, average clocks per flow and
// throughput at 125 MHz in the form of the performance table of the reference
// design, and checks that every flow got exactly one prediction, that the
// average stays within K_D + D + 4 ... K_MAX + D + 4 clocks, that accuracy on
// this synthetic data is at least 80 %, and that learning and
// reconstruction took place.
module tb_workload_datasets;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K_MAX = 128, K_D = 64;

  logic      flow_valid, flow_ready, pred_valid, pred_found;
  feat_vec_t flow_x, lab_x;
  label_t    pred_class, lab_y;
  idx_t      pred_cluster, num_clusters;
  dist_t     pred_distance;
  logic      lab_valid, lab_ready, cf_valid, cf_ready;
  cluster_t  cf_in;
  logic      reconstructing, ev_update, ev_new, ev_low_conf, ev_recon, ev_fifo_drop, ev_stale;

  traffic_classifier dut (.*);

  int n_update, n_new, n_recon, n_pred;
  always @(posedge clk) if (rst_n) begin
    if (ev_update) n_update++;
    if (ev_new) n_new++;
    if (ev_recon) n_recon++;
    if (pred_valid) n_pred++;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  feat_vec_t centre [8];
  bit        stream_done;

  function automatic feat_vec_t near(feat_vec_t c, int unsigned spread);
    feat_vec_t v;
    for (int i = 0; i < D; i++) begin
      int signed off = $signed($urandom_range(0, 2 * spread)) - $signed(spread);
      int signed val = int'(c[i]) + off;
      v[i] = feat_t'((val < 0) ? 0 : val);
    end
    return v;
  endfunction

  // one whole data-set sized stream, starting from a fresh reset
  task automatic run_stream(string name, int nflows, int nclass);
    int correct, labeled, held;
    longint t0, t1;
    label_t truth[$];
    int p0, u0, w0, r0;
    correct = 0; labeled = 0; held = 0;
    stream_done = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < nclass; c++) centre[c] = rand_vec(6) + {D{feat_t'(5 << FRAC_BITS)}};
    // initial model: K_D clusters from an offline batch
    for (int i = 0; i < K_D; i++) begin
      cluster_t c;
      int cls = i % nclass;
      c.a.valid = 1'b1;
      c.a.y     = label_t'(cls);
      c.a.mu    = near(centre[cls], 3 << (FRAC_BITS - 2));
      c.c.n     = count_t'($urandom_range(4, 30));
      for (int f = 0; f < D; f++) begin
        c.b[f]   = R_W'(c.c.n * (1 << (FRAC_BITS - 2)));
        c.c.u[f] = U_W'(1 << U_FRAC);
      end
      c.c.t = tstamp_t'($urandom_range(1, 4));
      @(negedge clk);
      cf_valid = 1; cf_in = c;
      @(posedge clk);
      while (!cf_ready) @(posedge clk);
      #1;
      cf_valid = 0;
    end
    repeat (5) @(negedge clk);
    p0 = n_pred; u0 = n_update; w0 = n_new; r0 = n_recon;
    t0 = cyc;
    fork
      begin : flows
        for (int n = 0; n < nflows; n++) begin
          int cls = $urandom_range(0, nclass - 1);
          feat_vec_t x = near(centre[cls], 1 << (FRAC_BITS - 1));
          // slow drift of the class centres
          if (n % 500 == 499) begin
            int dc = $urandom_range(0, nclass - 1);
            int df = $urandom_range(0, D - 1);
            if (centre[dc][df] > feat_t'(1 << FRAC_BITS) && $urandom_range(0, 1) == 0)
              centre[dc][df] = centre[dc][df] - feat_t'(1 << (FRAC_BITS - 2));
            else if (centre[dc][df] < feat_t'(20 << FRAC_BITS))
              centre[dc][df] = centre[dc][df] + feat_t'(1 << (FRAC_BITS - 2));
          end
          @(negedge clk);
          flow_valid = 1; flow_x = x;
          truth.push_back(label_t'(cls));
          // P = 10 %: the same flow is also offered to the host port
          if (n % 10 == 5 && !lab_valid) begin
            lab_valid = 1; lab_x = x; lab_y = label_t'(cls);
            labeled++;
          end
          @(posedge clk);
          while (!flow_ready) @(posedge clk);
        end
        #1;
        flow_valid = 0;
      end
      begin : host
        while (!stream_done) begin
          @(posedge clk);
          if (lab_valid && lab_ready) begin #1; lab_valid = 0; end
          else if (lab_valid && reconstructing) held++;
        end
      end
      begin : results
        for (int n = 0; n < nflows; n++) begin
          @(posedge clk);
          while (!pred_valid) @(posedge clk);
          if (pred_class == truth.pop_front()) correct++;
        end
        t1 = cyc;
        stream_done = 1;
      end
    join
    @(negedge clk);
    lab_valid = 0;
    repeat (2000) @(negedge clk);
    $display("%s: %0d flows, %0d labeled, total clocks %0d, %0.1f clocks per flow, %0.2f MCps at 125 MHz, %0.3f us per flow",
             name, nflows, labeled, t1 - t0, real'(t1 - t0) / nflows, 125.0 * nflows / real'(t1 - t0),
             real'(t1 - t0) / nflows / 125.0);
    $display("%s: synthetic accuracy %0.2f %%, updates %0d, new clusters %0d, reconstructions %0d",
             name, 100.0 * correct / nflows, n_update - u0, n_new - w0, n_recon - r0);
    checks++;
    if (n_pred - p0 != nflows) begin failures++; $display("FAIL %s: %0d predictions", name, n_pred - p0); end
    checks++;
    if (t1 - t0 > longint'(nflows) * (K_MAX + D + 4) || t1 - t0 < longint'(nflows) * (K_D + D + 4) - 100) begin
      failures++; $display("FAIL %s: clocks per flow out of range", name);
    end
    checks++;
    if (correct * 10 < nflows * 8) begin failures++; $display("FAIL %s: accuracy", name); end
    checks++;
    if (n_update - u0 == 0 || n_new - w0 == 0 || n_recon - r0 == 0) begin
      failures++; $display("FAIL %s: learning did not happen", name);
    end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flow_valid = 0; flow_x = '0; lab_valid = 0; lab_x = '0; lab_y = '0; cf_valid = 0; cf_in = '0;
    n_update = 0; n_new = 0; n_recon = 0; n_pred = 0;
    run_stream("UNIBS-sized stream", 77303, 5);
    run_stream("PAM-sized stream", 339061, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
