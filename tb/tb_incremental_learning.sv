// tb_incremental_learning: the learning unit with a real cluster memory,
// against a reference model of the learning rules. It preloads a model,
// then sends labeled instances (host) and classified instances (as the
// classifier would, with their nearest cluster) in random mixes, including
// bursts where a labeled instance arrives while classified ones wait in the
// FIFO (host priority). After every step the whole cluster memory must match
// the model: update inside the boundary, new cluster for a labeled instance
// outside it or of another class, nothing for a low-confidence classified
// instance, and reconstruction back to K_D clusters when K_MAX is reached.
// Also checks that a classified instance is learned in 10 to 50 clocks and
// that host instances are held off during reconstruction.
module tb_incremental_learning;
  import ntc_pkg::*;
  import tb_ntc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K_MAX = 128, K_D = 64;

  logic        cls_valid, lab_valid, lab_ready, cf_valid, cf_ready;
  learn_item_t cls_item;
  feat_vec_t   lab_x;
  label_t      lab_y;
  cluster_t    cf_in;
  logic        mem_wr_en, mem_rd_en;
  idx_t        mem_wr_addr, mem_rd_addr, num_clusters;
  cluster_t    mem_wr_data, mem_rd_data;
  logic        reconstructing, ev_update, ev_new, ev_low_conf, ev_recon, ev_fifo_drop, ev_stale;

  incremental_learning dut (.*);

  cluster_memory u_mem (
    .clk, .rst_n,
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .cls_rd_en(1'b0), .cls_rd_addr('0), .cls_rd_data(),
    .lrn_rd_en(mem_rd_en), .lrn_rd_addr(mem_rd_addr), .lrn_rd_data(mem_rd_data)
  );

  // ------------------------------------------------------------ reference
  cluster_t model [K_MAX];
  int       mcount = 0;
  int n_upd = 0, n_new = 0, n_low = 0, n_rec = 0, n_prio = 0, n_hold = 0;
  int ev_upd_seen = 0, ev_new_seen = 0, ev_low_seen = 0, ev_rec_seen = 0;

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
    n_rec++;
  endtask

  task automatic ref_add(cluster_t c);
    model[mcount] = c;
    mcount++;
    if (mcount == K_MAX) ref_reconstruct();
  endtask

  task automatic ref_labeled(feat_vec_t x, label_t y);
    nearest_t nn = ref_nearest(x);
    if (nn.found && ref_in_boundary(model[nn.idx].c.n, nn.distance, model[nn.idx].b) &&
        model[nn.idx].a.y == y) begin
      model[nn.idx] = ref_update(model[nn.idx], x);
      n_upd++;
    end else begin
      ref_add(ref_new_cluster(x, y));
      n_new++;
    end
  endtask

  task automatic ref_classified(learn_item_t it);
    if (!it.nn.found || it.nn.idx >= mcount) return;
    if (ref_in_boundary(model[it.nn.idx].c.n, it.nn.distance, model[it.nn.idx].b)) begin
      model[it.nn.idx] = ref_update(model[it.nn.idx], it.x);
      n_upd++;
    end else n_low++;
  endtask

  // ------------------------------------------------------------ helpers
  always @(posedge clk) if (rst_n) begin
    if (ev_update) ev_upd_seen++;
    if (ev_new) ev_new_seen++;
    if (ev_low_conf) ev_low_seen++;
    if (ev_recon) ev_rec_seen++;
    if (lab_valid && !lab_ready && reconstructing) n_hold++;
  end

  // learning time of classified instances: FIFO pop to event
  longint cyc = 0, t_pop = -1, lt_min = 1000, lt_max = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.q_pop) t_pop <= cyc;
    if ((ev_update || ev_low_conf) && t_pop >= 0 && !dut.cur_lab_q) begin
      checks++;
      if (cyc - t_pop < lt_min) lt_min = cyc - t_pop;
      if (cyc - t_pop > lt_max) lt_max = cyc - t_pop;
      if (cyc - t_pop < 10 || cyc - t_pop > 50) begin
        failures++; $display("FAIL learning took %0d clocks", cyc - t_pop);
      end
    end
  end

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 3) begin
      @(negedge clk);
      if (dut.state_q == dut.S_IDLE && dut.q_empty && !dut.need_recon) quiet++; else quiet = 0;
    end
  endtask

  task automatic compare_memory(string what);
    int bad = 0;
    for (int i = 0; i < K_MAX; i++) begin
      cluster_t got;
      got.a.valid = u_mem.u_mem_a.valid_q[i];
      got.a.y     = u_mem.u_mem_a.mem[i].y;
      got.a.mu    = u_mem.u_mem_a.mem[i].mu;
      got.b       = u_mem.u_mem_b.mem[i];
      got.c       = u_mem.u_mem_c.mem[i];
      if (got.a.valid !== model[i].a.valid || (model[i].a.valid && got !== model[i])) begin
        bad++;
        if (bad < 4) $display("FAIL %s addr %0d valid %0b/%0b n %0d/%0d t %0d/%0d", what, i,
                              got.a.valid, model[i].a.valid, got.c.n, model[i].c.n, got.c.t, model[i].c.t);
      end
    end
    checks++;
    if (bad != 0) failures++;
    checks++;
    if (num_clusters !== idx_t'(mcount)) begin
      failures++; $display("FAIL %s count %0d exp %0d", what, num_clusters, mcount);
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

  task automatic send_classified(feat_vec_t x);
    learn_item_t it;
    it.x  = x;
    it.nn = ref_nearest(x);
    @(negedge clk);
    cls_valid = 1; cls_item = it;
    @(negedge clk);
    cls_valid = 0;
    ref_classified(it);
  endtask

  function automatic feat_vec_t near(feat_vec_t c, int unsigned spread);
    feat_vec_t v;
    for (int i = 0; i < D; i++) begin
      int signed off = $signed($urandom_range(0, 2 * spread)) - $signed(spread);
      int signed val = int'(c[i]) + off;
      v[i] = feat_t'((val < 0) ? 0 : val);
    end
    return v;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cls_valid = 0; cls_item = '0; lab_valid = 0; lab_x = '0; lab_y = '0; cf_valid = 0; cf_in = '0;
    for (int i = 0; i < K_MAX; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initial model: 100 clusters
    for (int i = 0; i < 100; i++) begin
      automatic cluster_t c = rand_cluster(8);
      @(negedge clk);
      cf_valid = 1; cf_in = c;
      @(posedge clk);
      while (!cf_ready) @(posedge clk);
      #1;
      cf_valid = 0;
      ref_add(c);
    end
    wait_idle();
    compare_memory("preload");
    for (int step = 0; step < 400; step++) begin
      automatic int kind = $urandom_range(0, 9);
      automatic int pick = $urandom_range(0, (mcount > 0 ? mcount : 1) - 1);
      automatic feat_vec_t base = (mcount > 0) ? model[pick].a.mu : rand_vec(8);
      if (kind < 3) begin
        // labeled instance, same or other class
        automatic label_t y = ($urandom_range(0, 2) == 0) ? label_t'($urandom_range(0, 4)) : model[pick].a.y;
        automatic feat_vec_t x = near(base, $urandom_range(1, 3) << (FRAC_BITS - 2));
        send_labeled(x, y);
        ref_labeled(x, y);
      end else if (kind < 8) begin
        send_classified(near(base, $urandom_range(1, 4) << (FRAC_BITS - 3)));
      end else begin
        // burst: three classified instances queue up, then a labeled one,
        // which must be learned before the queued ones still waiting
        automatic learn_item_t its[3];
        automatic feat_vec_t lx = near(base, 1 << (FRAC_BITS - 2));
        automatic label_t    ly = label_t'($urandom_range(0, 4));
        for (int j = 0; j < 3; j++) begin
          its[j].x  = near(model[$urandom_range(0, mcount - 1)].a.mu, 1 << (FRAC_BITS - 3));
          its[j].nn = ref_nearest(its[j].x);
        end
        for (int j = 0; j < 3; j++) begin
          @(negedge clk);
          cls_valid = 1; cls_item = its[j];
        end
        lab_valid = 1; lab_x = lx; lab_y = ly;
        @(negedge clk);
        cls_valid = 0;
        // the first item was popped already; the labeled one goes next
        while (!lab_ready) @(negedge clk);
        @(negedge clk);
        lab_valid = 0;
        ref_classified(its[0]);
        ref_labeled(lx, ly);
        ref_classified(its[1]);
        ref_classified(its[2]);
        n_prio++;
        if (mcount == K_MAX - 1 && step % 2 == 0) begin end
      end
      wait_idle();
      compare_memory($sformatf("step %0d", step));
      checks++;
      if (ev_upd_seen != n_upd || ev_new_seen != n_new || ev_low_seen != n_low) begin
        failures++;
        $display("FAIL step %0d kind %0d events %0d/%0d %0d/%0d %0d/%0d", step, kind,
                 ev_upd_seen, n_upd, ev_new_seen, n_new, ev_low_seen, n_low);
      end
      // now and then a host instance while reconstruction runs
      if (mcount >= K_MAX - 2 && n_hold == 0) begin
        // push the model to K_MAX with new clusters, then offer another one
        while (mcount < K_MAX - 1) begin
          automatic feat_vec_t x = rand_vec(8) + '1;
          send_labeled(x, 5'd7);
          ref_labeled(x, 5'd7);
        end
        begin
          automatic feat_vec_t x1 = rand_vec(8), x2 = rand_vec(8);
          send_labeled(x1, 5'd9);
          ref_labeled(x1, 5'd9);
          send_labeled(x2, 5'd9);   // offered during reconstruction, waits
          ref_labeled(x2, 5'd9);
        end
        wait_idle();
        compare_memory("during reconstruction");
      end
    end
    $display("learning clocks per classified instance: %0d to %0d", lt_min, lt_max);
    $display("updates=%0d new=%0d low=%0d recon=%0d priority=%0d held=%0d", n_upd, n_new, n_low, n_rec, n_prio, n_hold);
    checks++;
    if (ev_upd_seen != n_upd || ev_new_seen != n_new || ev_low_seen != n_low || ev_rec_seen != n_rec) begin
      failures++;
      $display("FAIL events %0d %0d %0d %0d", ev_upd_seen, ev_new_seen, ev_low_seen, ev_rec_seen);
    end
    checks++;
    if (n_upd == 0 || n_new == 0 || n_low == 0 || n_rec == 0 || n_hold == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
