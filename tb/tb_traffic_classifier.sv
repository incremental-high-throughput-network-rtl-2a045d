// tb_traffic_classifier: end-to-end test of the classifier at its default
// sizes (K_MAX = 128, K_D = 64, D = 6), on synthetic traffic of five classes
// whose flows scatter around a class centre.
//
// An initial model of K_D clusters is loaded through the cf port. Then two
// setups run, as in the evaluation of the design:
//  A. interleave-test-then-train: each flow is classified only after the
//     previous learning has finished. Every prediction (class, nearest
//     cluster, distance) and its latency of k + D + 4 clocks are checked
//     against a reference model of the whole algorithm, which also learns;
//     10 % of the flows are then given to the host port with their true
//     label. The cluster memory is compared with the model every 25 flows.
//  B. simultaneous-test-and-train: flows arrive back to back while labeled
//     instances come in; each flow must get exactly one prediction, within
//     the latency bounds, and the model must stay packed from address 0.
// Counts how often each mechanism happened (update, new cluster, low
// confidence, reconstruction, FIFO buffering, host held during
// reconstruction, fixed and radius boundary checks) and fails if one never
// did. Reports accuracy and throughput in classifications per second at
// 125 MHz.
module tb_traffic_classifier;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K_MAX = 128, K_D = 64, NCLASS = 5;
  localparam int FLOWS_A = 1200, FLOWS_B = 1500;

  logic      flow_valid, flow_ready, pred_valid, pred_found;
  feat_vec_t flow_x, lab_x;
  label_t    pred_class, lab_y;
  idx_t      pred_cluster, num_clusters;
  dist_t     pred_distance;
  logic      lab_valid, lab_ready, cf_valid, cf_ready;
  cluster_t  cf_in;
  logic      reconstructing, ev_update, ev_new, ev_low_conf, ev_recon, ev_fifo_drop, ev_stale;

  traffic_classifier dut (.*);

  // ------------------------------------------------------------ reference
  cluster_t  model [K_MAX];
  int        mcount = 0;
  feat_vec_t centre [NCLASS];

  function automatic nearest_t ref_nearest(feat_vec_t x);
    nearest_t r = '0;
    for (int i = 0; i < mcount; i++) begin
      dist_t dd = ref_distance(x, model[i].a.mu);
      if (!r.found || dd < r.distance) r = '{found: 1'b1, idx: idx_t'(i), distance: dd, y: model[i].a.y};
    end
    return r;
  endfunction

  task automatic ref_reconstruct();
    cluster_t q[$];
    for (int i = 0; i < K_MAX; i++)
      if (model[i].a.valid && model[i].c.t != 0) begin
        cluster_t c = model[i];
        c.c.t = c.c.t - 1;
        q.push_back(c);
      end
    while (q.size() > K_D) begin
      cluster_t h = q.pop_front();
      if (h.c.t != 0) begin h.c.t = h.c.t - 1; q.push_back(h); end
    end
    for (int i = 0; i < K_MAX; i++) model[i] = (i < q.size()) ? q[i] : '0;
    mcount = q.size();
  endtask

  task automatic ref_add(cluster_t c);
    model[mcount] = c;
    mcount++;
    if (mcount == K_MAX) ref_reconstruct();
  endtask

  task automatic ref_labeled(feat_vec_t x, label_t y);
    nearest_t nn = ref_nearest(x);
    if (nn.found && ref_in_boundary(model[nn.idx].c.n, nn.distance, model[nn.idx].b) &&
        model[nn.idx].a.y == y)
      model[nn.idx] = ref_update(model[nn.idx], x);
    else
      ref_add(ref_new_cluster(x, y));
  endtask

  task automatic ref_classified(feat_vec_t x, nearest_t nn);
    if (!nn.found || nn.idx >= mcount) return;
    if (ref_in_boundary(model[nn.idx].c.n, nn.distance, model[nn.idx].b))
      model[nn.idx] = ref_update(model[nn.idx], x);
  endtask

  // ------------------------------------------------------------ stimulus
  function automatic feat_vec_t near(feat_vec_t c, int unsigned spread);
    feat_vec_t v;
    for (int i = 0; i < D; i++) begin
      int signed off = $signed($urandom_range(0, 2 * spread)) - $signed(spread);
      int signed val = int'(c[i]) + off;
      v[i] = feat_t'((val < 0) ? 0 : val);
    end
    return v;
  endfunction

  // ------------------------------------------------------------ monitors
  longint cyc = 0;
  int n_update = 0, n_new = 0, n_low = 0, n_recon = 0, n_drop = 0, n_stale = 0;
  int n_buffered = 0, n_held = 0, n_fix = 0, n_radius = 0, n_pred = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ev_update) n_update++;
    if (ev_new) n_new++;
    if (ev_low_conf) n_low++;
    if (ev_recon) n_recon++;
    if (ev_fifo_drop) n_drop++;
    if (ev_stale) n_stale++;
    if (pred_valid) n_pred++;
    // a classified instance that has to wait for the learning unit
    if (dut.u_incremental_learning.u_fifo.push &&
        (dut.u_incremental_learning.state_q != dut.u_incremental_learning.S_IDLE ||
         !dut.u_incremental_learning.q_empty)) n_buffered++;
    if (lab_valid && !lab_ready && reconstructing) n_held++;
    if (dut.u_incremental_learning.bc_done) begin
      if (dut.u_incremental_learning.u_boundary_check.n_q <= 1) n_fix++; else n_radius++;
    end
  end

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 3) begin
      @(negedge clk);
      if (dut.u_incremental_learning.state_q == dut.u_incremental_learning.S_IDLE &&
          dut.u_incremental_learning.q_empty && !dut.u_incremental_learning.need_recon) quiet++;
      else quiet = 0;
    end
  endtask

  task automatic compare_memory(string what);
    int bad = 0;
    for (int i = 0; i < K_MAX; i++) begin
      cluster_t got;
      got.a.valid = dut.u_cluster_memory.u_mem_a.valid_q[i];
      got.a.y     = dut.u_cluster_memory.u_mem_a.mem[i].y;
      got.a.mu    = dut.u_cluster_memory.u_mem_a.mem[i].mu;
      got.b       = dut.u_cluster_memory.u_mem_b.mem[i];
      got.c       = dut.u_cluster_memory.u_mem_c.mem[i];
      if (got.a.valid !== model[i].a.valid || (model[i].a.valid && got !== model[i])) begin
        bad++;
        if (bad < 4) $display("FAIL %s addr %0d", what, i);
      end
    end
    checks++;
    if (bad != 0 || num_clusters !== idx_t'(mcount)) begin
      failures++; $display("FAIL %s: %0d records differ, count %0d exp %0d", what, bad, num_clusters, mcount);
    end
  endtask

  task automatic send_labeled(feat_vec_t x, label_t y);
    @(negedge clk);
    lab_valid = 1; lab_x = x; lab_y = y;
    @(posedge clk);
    while (!lab_ready) @(posedge clk);
    #1;
    lab_valid = 0;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int correct_a, correct_b;
    longint t_b0, t_b1;
    flow_valid = 0; flow_x = '0; lab_valid = 0; lab_x = '0; lab_y = '0; cf_valid = 0; cf_in = '0;
    correct_a = 0; correct_b = 0;
    for (int i = 0; i < K_MAX; i++) model[i] = '0;
    for (int c = 0; c < NCLASS; c++) centre[c] = rand_vec(8) + {D{feat_t'(4 << FRAC_BITS)}};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- initial model: K_D clusters around the class centres
    for (int i = 0; i < K_D; i++) begin
      automatic cluster_t c;
      automatic int cls = i % NCLASS;
      c.a.valid = 1'b1;
      c.a.y     = label_t'(cls);
      c.a.mu    = near(centre[cls], 3 << (FRAC_BITS - 2));
      c.c.n     = count_t'((i % 8 == 0) ? 1 : $urandom_range(4, 30));
      for (int f = 0; f < D; f++) begin
        c.b[f]   = R_W'((c.c.n == 1) ? 0 : c.c.n * (1 << (FRAC_BITS - 2)));
        c.c.u[f] = U_W'(1 << U_FRAC);
      end
      c.c.t = tstamp_t'($urandom_range(1, 4));
      @(negedge clk);
      cf_valid = 1; cf_in = c;
      @(posedge clk);
      while (!cf_ready) @(posedge clk);
      #1;
      cf_valid = 0;
      ref_add(c);
    end
    wait_idle();
    compare_memory("initial model");

    // ---------------- A: interleave-test-then-train
    for (int n = 0; n < FLOWS_A; n++) begin
      automatic int       cls = $urandom_range(0, NCLASS - 1);
      automatic feat_vec_t x  = near(centre[cls], 1 << (FRAC_BITS - 1));
      automatic nearest_t exp = ref_nearest(x);
      automatic longint   t0;
      @(negedge clk);
      flow_valid = 1; flow_x = x;
      while (!flow_ready) @(negedge clk);
      t0 = cyc;
      @(negedge clk);
      flow_valid = 0;
      while (!pred_valid) @(negedge clk);
      checks++;
      if (cyc - t0 != longint'(mcount + D + 4)) begin
        failures++; $display("FAIL flow %0d latency %0d exp %0d", n, cyc - t0, mcount + D + 4);
      end
      checks++;
      if (pred_found !== exp.found || pred_class !== exp.y || pred_cluster !== exp.idx ||
          pred_distance !== exp.distance) begin
        failures++;
        if (failures < 10) $display("FAIL flow %0d class %0d/%0d cluster %0d/%0d", n, pred_class, exp.y,
                                    pred_cluster, exp.idx);
      end
      if (pred_class == label_t'(cls)) correct_a++;
      ref_classified(x, exp);
      wait_idle();
      if (n % 10 == 3) begin
        // a labeled instance; every other one lies farther out
        automatic feat_vec_t lx = near(centre[cls], (n % 20 == 3) ? (1 << FRAC_BITS) : (1 << (FRAC_BITS - 1)));
        send_labeled(lx, label_t'(cls));
        ref_labeled(lx, label_t'(cls));
        wait_idle();
      end
      if (n % 25 == 24) compare_memory($sformatf("A flow %0d", n));
    end
    $display("A: accuracy %0d/%0d, clusters %0d", correct_a, FLOWS_A, mcount);
    checks++;
    if (correct_a * 10 < FLOWS_A * 8) begin failures++; $display("FAIL accuracy A too low"); end

    // ---------------- B: simultaneous-test-and-train
    begin
      int preds_before;
      int accepted;
      label_t truth[$];
      preds_before = n_pred;
      accepted = 0;
      t_b0 = cyc;
      fork
        begin : flows
          for (int n = 0; n < FLOWS_B; n++) begin
            automatic int cls = $urandom_range(0, NCLASS - 1);
            @(negedge clk);
            flow_valid = 1; flow_x = near(centre[cls], 1 << (FRAC_BITS - 1));
            truth.push_back(label_t'(cls));
            @(posedge clk);
            while (!flow_ready) @(posedge clk);
            accepted++;
          end
          #1;
          flow_valid = 0;
        end
        begin : labels
          for (int n = 0; n < FLOWS_B / 10; n++) begin
            automatic int cls = $urandom_range(0, NCLASS - 1);
            repeat ($urandom_range(200, 1800)) @(negedge clk);
            send_labeled(near(centre[cls], (n % 2) ? (1 << FRAC_BITS) : (1 << (FRAC_BITS - 1))), label_t'(cls));
          end
        end
        begin : results
          for (int n = 0; n < FLOWS_B; n++) begin
            @(posedge clk);
            while (!pred_valid) @(posedge clk);
            if (pred_class == truth[n]) correct_b++;
            checks++;
            if (!pred_found) begin failures++; $display("FAIL B flow %0d no cluster", n); end
          end
          t_b1 = cyc;
        end
      join
      wait_idle();
      checks++;
      if (n_pred - preds_before != FLOWS_B || accepted != FLOWS_B) begin
        failures++; $display("FAIL B predictions %0d accepted %0d", n_pred - preds_before, accepted);
      end
      // average clocks per classification must stay within k + D + 4
      checks++;
      if ((t_b1 - t_b0) > longint'(FLOWS_B) * (K_MAX + D + 4)) begin
        failures++; $display("FAIL B throughput");
      end
      // the model stays packed: valid exactly below the count
      checks++;
      for (int i = 0; i < K_MAX; i++)
        if (dut.u_cluster_memory.u_mem_a.valid_q[i] !== (i < num_clusters)) begin
          failures++; $display("FAIL B model not packed at %0d", i); break;
        end
      $display("B: accuracy %0d/%0d, %0d clocks, %0.1f clocks per flow, %0.3f M classifications/s at 125 MHz",
               correct_b, FLOWS_B, t_b1 - t_b0, real'(t_b1 - t_b0) / FLOWS_B,
               125.0 * FLOWS_B / real'(t_b1 - t_b0));
      checks++;
      if (correct_b * 10 < FLOWS_B * 8) begin failures++; $display("FAIL accuracy B too low"); end
    end

    $display("mechanisms: update=%0d new=%0d low_conf=%0d recon=%0d buffered=%0d host_held=%0d fixed_boundary=%0d radius_boundary=%0d dropped=%0d stale=%0d",
             n_update, n_new, n_low, n_recon, n_buffered, n_held, n_fix, n_radius, n_drop, n_stale);
    checks++;
    if (n_update == 0 || n_new == 0 || n_low == 0 || n_recon == 0 || n_buffered == 0 || n_held == 0 ||
        n_fix == 0 || n_radius == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
