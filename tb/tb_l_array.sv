// tb_l_array: end-to-end test of the L-array at its default size (16 L-cells,
// 512-word S-buffers).
//
// Each scenario builds a random but legal lazy data movement: a random initial
// layout of S-cells of random size (2..450 words, with random start offsets so
// that images wrap around the circular buffers), some of them clonable with 1..3
// clones, optionally extra S-cells fed in at one end of the array by a virtual
// L-cell and S-cells pushed out at the other end (in a third of the scenarios
// the virtual L-cell there takes words slowly, so that blockage builds up
// behind it). The final layout is derived
// independently of the design: every clonable S-cell spreads over a segment of
// 1+clones cells around its position, and a segment that would overlap the
// previous one pushes everything after it along. From that layout the test
// computes the flow number of every connection (an S-cell counted once while it
// travels, each clone counted on its own), loads the S-images through the CPU
// ports, runs data movement, and then checks through the CPU ports (with the
// address translation loaded by the design) that every cell holds exactly the
// S-image it should, that the S-images leaving the array are the right ones in
// the right order, that every flow register has returned to zero, and that the
// array's done did not rise before every cell had finished, and that the
// shortest gap between two words on a link between cells is five clocks, the
// rate of an unblocked, uncontested link. While the S-cells
// move, the CPUs keep reading their S-buffers; in a cell that has finished and
// whose S-image never moved, these reads are checked through the translated
// address.
// Half of the scenarios are mirrored so that pushes run to the left. All
// parameters of the array are left at their defaults.
//
// It counts how often each mechanism happened (pure shifting, cloning from
// either port, bidirectional cloning, blockage on a full buffer, a sender
// waiting on an empty buffer, contention between the two shifters, a CPU
// access held off by a shifter, S-cells
// entering and leaving the array, images wrapping around the buffer, translation
// with a non-zero base) and counts a failure for any that never happened.
`timescale 1ns/1ps
module tb_l_array;
  import lcell_pkg::*;

  localparam int LSIZE  = 16;
  localparam int BUF_AW = 9;
  localparam int BSIZE  = 2**BUF_AW;
  localparam int CPU_AW = 16;
  localparam int FLOW_W = 16;
  localparam int SBUF_PAGE = 1;
  localparam int NSCEN  = 60;
  localparam int MAXI   = LSIZE + 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [FLOW_W-1:0] flow [LSIZE+1];
  logic [BUF_AW-1:0] img_start [LSIZE], img_end [LSIZE];
  logic done;
  logic [LSIZE-1:0] cell_done;
  logic [LSIZE-1:0] done_cells;
  logic [BUF_AW-1:0] final_start [LSIZE], final_end [LSIZE];
  logic in_l_ready = 0, in_l_ack, out_l_ready, out_l_ack = 0;
  logic [DATA_W-1:0] in_l_data = 0, out_l_data;
  logic out_r_ready, out_r_ack = 0, in_r_ready = 0, in_r_ack;
  logic [DATA_W-1:0] out_r_data, in_r_data = 0;
  logic [LSIZE-1:0] cpu_req = '0, cpu_we = '0, cpu_done, cpu_base_we = '0;
  logic [CPU_AW-1:0] cpu_addr [LSIZE];
  logic [DATA_W-1:0] cpu_wdata [LSIZE], cpu_rdata [LSIZE];
  logic [BUF_AW-1:0] cpu_base_wdata [LSIZE];

  l_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // ---------------- watchdog ----------------
  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_pure [LSIZE], n_clone_l [LSIZE], n_clone_r [LSIZE], n_block [LSIZE];
  int n_starve [LSIZE], n_conflict [LSIZE], n_cpu_wait [LSIZE];
  bit cl_l [LSIZE], cl_r [LSIZE];
  logic flow_nz [LSIZE];
  int n_bidir = 0, n_in = 0, n_out = 0, n_wrap = 0, n_xbase = 0;

  for (genvar k = 0; k < LSIZE; k++) begin : g_mon
    initial begin
      n_pure[k] = 0; n_clone_l[k] = 0; n_clone_r[k] = 0; n_block[k] = 0;
      n_starve[k] = 0; n_conflict[k] = 0; n_cpu_wait[k] = 0;
    end
    assign flow_nz[k] = (dut.g_cell[k].u_cell.left_flow != 0) || (dut.g_cell[k].u_cell.right_flow != 0);
    always @(posedge clk) if (rst_n) begin
      n_pure[k]     += int'(dut.g_cell[k].u_cell.ev_pure[0]) + int'(dut.g_cell[k].u_cell.ev_pure[1]);
      if (dut.g_cell[k].u_cell.ev_clone[0]) begin n_clone_l[k]++; cl_l[k] = 1'b1; end
      if (dut.g_cell[k].u_cell.ev_clone[1]) begin n_clone_r[k]++; cl_r[k] = 1'b1; end
      n_block[k]    += int'(|dut.g_cell[k].u_cell.ev_block);
      n_starve[k]   += int'(|dut.g_cell[k].u_cell.ev_starve);
      n_conflict[k] += int'(dut.g_cell[k].u_cell.ev_conflict);
      // the CPU asks for the S-buffer while a shifter holds it
      n_cpu_wait[k] += int'(dut.g_cell[k].u_cell.u_buf.cpu_req && |dut.g_cell[k].u_cell.u_buf.eligible);
    end
  end

  // Word rate between neighbouring cells: the shortest gap between two words
  // crossing any inner connection, in either direction.
  longint min_gap = 1000000;
  for (genvar c = 1; c < LSIZE; c++) begin : g_rate
    longint last_r = -1, last_l = -1;
    logic   prev_r = 1'b0, prev_l = 1'b0;
    always @(posedge clk) if (rst_n) begin
      if (dut.rw_ready[c] && !prev_r) begin
        if (last_r >= 0 && cycles - last_r < min_gap) min_gap = cycles - last_r;
        last_r = cycles;
      end
      if (dut.lw_ready[c] && !prev_l) begin
        if (last_l >= 0 && cycles - last_l < min_gap) min_gap = cycles - last_l;
        last_l = cycles;
      end
      prev_r = dut.rw_ready[c];
      prev_l = dut.lw_ready[c];
    end
  end

  // ---------------- scenario data ----------------
  // Items in "virtual" coordinates (pushes go right); item 0 is the S-cell fed
  // in at the virtual left end, items 1..K are the initial S-cells.
  int K, e_in;
  int it_p [MAXI], it_c [MAXI], it_l [MAXI], it_a [MAXI], it_b [MAXI], it_m [MAXI];
  int it_size [MAXI], it_seed [MAXI];
  bit it_exit [MAXI];
  int vflow [LSIZE+1];
  int owner [LSIZE];            // item finally held by virtual cell q, -1 = empty
  int init_item [LSIZE];        // item initially held by virtual cell q, -1 = empty
  int exit_q [$];
  bit mirror;
  bit slow_drain;   // the virtual cell beyond the end accepts words slowly

  function automatic logic [7:0] item_byte(int id, int i);
    if (i == 0) return it_size[id][7:0];
    if (i == 1) return it_size[id][15:8];
    return 8'((it_seed[id] * 131 + i * 29 + (i >> 3)) ^ (id << 4));
  endfunction

  function automatic int clamp(int v, int lo, int hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  // Returns 1 if the random layout is usable.
  function automatic bit gen_layout();
    int prev_b, q, j, occ;
    K = 0;
    e_in = ($urandom_range(2, 0) == 0) ? 1 + int'($urandom_range(1, 0)) : 0;
    it_p[0] = -1; it_c[0] = e_in; it_size[0] = 2 + int'($urandom_range(119, 0));
    it_seed[0] = int'($urandom_range(996, 0)); it_exit[0] = 0;
    for (q = 0; q < LSIZE; q++) begin
      init_item[q] = -1;
      owner[q] = -1;
    end
    occ = 35 + int'($urandom_range(44, 0));
    for (q = 0; q < LSIZE; q++) begin
      if (int'($urandom_range(99, 0)) < occ) begin
        K++;
        it_p[K] = q;
        it_c[K] = ($urandom_range(2, 0) == 0) ? 1 + int'($urandom_range(2, 0)) : 0;
        it_l[K] = (it_c[K] > 0) ? int'($urandom_range(it_c[K], 0)) : 0;
        case ($urandom_range(3, 0))
          0:       it_size[K] = 2 + int'($urandom_range(7, 0));
          1:       it_size[K] = 250 + int'($urandom_range(200, 0));
          default: it_size[K] = 2 + int'($urandom_range(298, 0));
        endcase
        it_seed[K] = int'($urandom_range(996, 0));
        it_exit[K] = 0;
        init_item[q] = K;
      end
    end
    prev_b = e_in - 1;
    for (q = 0; q < e_in; q++) owner[q] = 0;
    for (j = 1; j <= K; j++) begin
      it_a[j] = it_p[j] - it_l[j];
      if (it_a[j] < prev_b + 1) it_a[j] = prev_b + 1;
      if (it_a[j] < 0) it_a[j] = 0;
      it_b[j] = it_a[j] + it_c[j];
      if (it_a[j] >= LSIZE) begin
        if (it_c[j] != 0) return 0;
        it_exit[j] = 1;
        it_m[j] = LSIZE;
      end else begin
        if (it_b[j] >= LSIZE) return 0;
        it_m[j] = clamp(it_p[j], it_a[j], it_b[j]);
        for (q = it_a[j]; q <= it_b[j]; q++) owner[q] = j;
      end
      prev_b = it_b[j];
    end
    // flow numbers of the connections (connection k is left of cell k)
    for (q = 0; q <= LSIZE; q++) vflow[q] = 0;
    for (q = 0; q < e_in; q++)
      for (int k = 0; k <= q; k++) vflow[k]++;
    for (j = 1; j <= K; j++) begin
      if (it_m[j] > it_p[j]) for (int k = it_p[j] + 1; k <= it_m[j]; k++) vflow[k]++;
      if (it_m[j] < it_p[j]) for (int k = it_m[j] + 1; k <= it_p[j]; k++) vflow[k]--;
      if (!it_exit[j])
        for (q = it_a[j]; q <= it_b[j]; q++) begin
          if (q > it_m[j]) for (int k = it_m[j] + 1; k <= q; k++) vflow[k]++;
          if (q < it_m[j]) for (int k = q + 1; k <= it_m[j]; k++) vflow[k]--;
        end
    end
    return 1;
  endfunction

  // virtual cell -> physical cell
  function automatic int phys(int q);
    return mirror ? LSIZE - 1 - q : q;
  endfunction

  // ---------------- CPU port tasks ----------------
  task automatic cpu_access(int k, bit we, int offs, logic [7:0] wd, output logic [7:0] rd);
    cpu_addr[k]  = CPU_AW'((SBUF_PAGE << BUF_AW) | offs);
    cpu_wdata[k] = wd;
    cpu_we[k]    = we;
    cpu_req[k]   = 1'b1;
    do @(posedge clk); while (!cpu_done[k]);
    rd = cpu_rdata[k];
    cpu_req[k] = 1'b0;
    cpu_we[k]  = 1'b0;
    @(posedge clk);
  endtask

  task automatic set_base(int k, int b);
    cpu_base_wdata[k] = BUF_AW'(b);
    cpu_base_we[k] = 1'b1;
    @(posedge clk);
    cpu_base_we[k] = 1'b0;
  endtask

  // ---------------- link BFMs at the two ends ----------------
  // Feed 'n' copies of item 0 into the array.
  task automatic feed(bit right_end, int n);
    for (int c = 0; c < n; c++) begin
      for (int i = 0; i < it_size[0]; i++) begin
        if (!right_end) begin
          while (in_l_ack) @(posedge clk);
          in_l_data = item_byte(0, i); in_l_ready = 1'b1;
          do @(posedge clk); while (!in_l_ack);
          in_l_ready = 1'b0;
        end else begin
          while (in_r_ack) @(posedge clk);
          in_r_data = item_byte(0, i); in_r_ready = 1'b1;
          do @(posedge clk); while (!in_r_ack);
          in_r_ready = 1'b0;
        end
      end
      n_in++;
    end
  endtask

  // Take the S-cells that leave the array and compare with the expected ones.
  task automatic drain(bit left_end);
    while (exit_q.size() > 0) begin
      int id, n;
      logic [7:0] d;
      logic [15:0] wc;
      id = exit_q.pop_front();
      n = 2;
      for (int i = 0; i < n; i++) begin
        if (!left_end) begin
          do @(posedge clk); while (!out_r_ready);
          repeat (slow_drain ? int'($urandom_range(60, 0)) : 0) @(posedge clk);
          d = out_r_data; out_r_ack = 1'b1;
          do @(posedge clk); while (out_r_ready);
          out_r_ack = 1'b0;
        end else begin
          do @(posedge clk); while (!out_l_ready);
          repeat (slow_drain ? int'($urandom_range(60, 0)) : 0) @(posedge clk);
          d = out_l_data; out_l_ack = 1'b1;
          do @(posedge clk); while (out_l_ready);
          out_l_ack = 1'b0;
        end
        if (i == 0) wc[7:0] = d;
        if (i == 1) begin wc[15:8] = d; n = int'(wc); end
        checks++;
        if (d !== item_byte(id, i)) begin
          failures++;
          $display("exit item %0d byte %0d: got %02x want %02x", id, i, d, item_byte(id, i));
        end
      end
      n_out++;
    end
  endtask

  // CPU reads while the S-cells move. A cell whose flows are both zero keeps its
  // S-image in place; once it has finished, its translation base points at the
  // image, so byte i is read at offset i and can be checked. Reads elsewhere only
  // have to complete.
  int  still_item [LSIZE];      // item held by a physical cell with zero flows, else -1
  bit  mv_done;
  int  n_cpu_live = 0;
  task automatic cpu_during_move();
    int k, i;
    logic [7:0] rd;
    while (!mv_done) begin
      k = int'($urandom_range(LSIZE - 1, 0));
      if (still_item[k] >= 0 && cell_done[k]) begin
        i = int'($urandom_range(it_size[still_item[k]] - 1, 0));
        cpu_access(k, 1'b0, i, 8'h00, rd);
        checks++;
        n_cpu_live++;
        if (rd !== item_byte(still_item[k], i)) begin
          failures++;
          $display("cell %0d byte %0d read during movement: got %02x want %02x", k, i, rd,
                   item_byte(still_item[k], i));
        end
      end else begin
        cpu_access(k, 1'b0, int'($urandom_range(BSIZE - 1, 0)), 8'h00, rd);
      end
      repeat ($urandom_range(6, 0)) @(posedge clk);
    end
  endtask

  // ---------------- one scenario ----------------
  task automatic run_scenario(int s);
    int tries, k, q, id, sz, st;
    logic [7:0] rd;
    longint t0;
    mirror = s[0];
    slow_drain = (s % 3) == 0;
    tries = 0;
    while (!gen_layout()) tries++;
    foreach (cl_l[i]) begin cl_l[i] = 0; cl_r[i] = 0; end
    // flow numbers in physical orientation
    for (int c = 0; c <= LSIZE; c++)
      flow[c] = mirror ? FLOW_W'(-vflow[LSIZE - c]) : FLOW_W'(vflow[c]);
    // initial S-images
    for (q = 0; q < LSIZE; q++) begin
      k = phys(q);
      id = init_item[q];
      st = int'($urandom_range(BSIZE - 1, 0));
      if ((s % 5) == 2) st = BSIZE - 3;           // force wrapping images
      img_start[k] = BUF_AW'(st);
      still_item[k] = (id >= 0 && flow[k] == 0 && flow[k+1] == 0) ? id : -1;
      if (id < 0) begin
        img_end[k] = BUF_AW'(st);
      end else begin
        img_end[k] = BUF_AW'((st + it_size[id]) % BSIZE);
        if (st + it_size[id] > BSIZE) n_wrap++;
        set_base(k, 0);
        for (int i = 0; i < it_size[id]; i++)
          cpu_access(k, 1'b1, (st + i) % BSIZE, item_byte(id, i), rd);
      end
    end
    exit_q.delete();
    for (int j = 1; j <= K; j++) if (it_exit[j]) exit_q.push_front(j);  // the rightmost leaves first
    $display("scenario %0d: mirror=%0d items=%0d in=%0d out=%0d flows=%p",
             s, mirror, K, e_in, exit_q.size(), flow);
    @(posedge clk);
    start = 1'b1;
    @(posedge clk);
    start = 1'b0;
    t0 = cycles;
    mv_done = 1'b0;
    fork
      cpu_during_move();
      feed(mirror, e_in);
      drain(mirror);
      begin
        do @(posedge clk); while (!done);
        done_cells = cell_done;
        mv_done = 1'b1;
      end
    join
    // the array may only report completion once every cell has finished
    checks++;
    if (done_cells != '1) begin
      failures++;
      $display("done rose with cells %b still busy", ~done_cells);
    end
    $display("  data movement took %0d cycles", cycles - t0);
    @(posedge clk);
    // every flow register back at zero
    checks++;
    for (k = 0; k < LSIZE; k++)
      if (flow_nz[k]) begin
        failures++;
        $display("cell %0d: flow registers not zero", k);
      end
    // final contents
    for (q = 0; q < LSIZE; q++) begin
      k = phys(q);
      id = owner[q];
      sz = (id < 0) ? 0 : it_size[id];
      if (cl_l[k] && cl_r[k]) n_bidir++;
      checks++;
      if (int'((final_end[k] - final_start[k]) % BSIZE) != sz) begin
        failures++;
        $display("cell %0d: holds %0d words, want %0d (item %0d)", k,
                 int'((final_end[k] - final_start[k]) % BSIZE), sz, id);
      end
      if (final_start[k] != 0 && sz > 0) n_xbase++;
      if (int'(final_start[k]) + sz > BSIZE) n_wrap++;
      for (int i = 0; i < sz; i++) begin
        cpu_access(k, 1'b0, i, 8'h00, rd);
        checks++;
        if (rd !== item_byte(id, i)) begin
          failures++;
          if (failures < 20)
            $display("cell %0d byte %0d: got %02x want %02x (item %0d)", k, i, rd, item_byte(id, i), id);
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < LSIZE; k++) begin
      cpu_addr[k] = '0; cpu_wdata[k] = '0; cpu_base_wdata[k] = '0;
      img_start[k] = '0; img_end[k] = '0;
    end
    for (int c = 0; c <= LSIZE; c++) flow[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < NSCEN; s++) run_scenario(s);
    begin
      int tp, tcl, tcr, tb, ts, tc, tw;
      tp = 0; tcl = 0; tcr = 0; tb = 0; ts = 0; tc = 0; tw = 0;
      for (int k = 0; k < LSIZE; k++) begin
        tp += n_pure[k]; tcl += n_clone_l[k]; tcr += n_clone_r[k];
        tb += n_block[k]; ts += n_starve[k]; tc += n_conflict[k]; tw += n_cpu_wait[k];
      end
      $display("mechanisms: pure=%0d clone_left=%0d clone_right=%0d bidirectional=%0d blocked=%0d starved=%0d contention=%0d fed_in=%0d pushed_out=%0d wrap=%0d translated=%0d cpu_waited=%0d cpu_live_reads=%0d",
               tp, tcl, tcr, n_bidir, tb, ts, tc, n_in, n_out, n_wrap, n_xbase, tw, n_cpu_live);
      checks++; if (tp == 0)      begin failures++; $display("pure shifting never happened"); end
      checks++; if (tcl == 0)     begin failures++; $display("cloning through SL never happened"); end
      checks++; if (tcr == 0)     begin failures++; $display("cloning through SR never happened"); end
      checks++; if (n_bidir == 0) begin failures++; $display("bidirectional cloning never happened"); end
      checks++; if (tb == 0)      begin failures++; $display("blockage on a full buffer never happened"); end
      checks++; if (ts == 0)      begin failures++; $display("a sender never waited on an empty buffer"); end
      checks++; if (tc == 0)      begin failures++; $display("shifter contention never happened"); end
      checks++; if (n_in == 0)    begin failures++; $display("no S-cell was fed in at an end"); end
      checks++; if (n_out == 0)   begin failures++; $display("no S-cell left the array"); end
      checks++; if (n_wrap == 0)  begin failures++; $display("no image wrapped around a buffer"); end
      checks++; if (n_xbase == 0) begin failures++; $display("translation base never non-zero"); end
      checks++; if (tw == 0)      begin failures++; $display("the CPU never waited for a shifter"); end
      checks++; if (n_cpu_live == 0) begin failures++; $display("no checked CPU read during movement"); end
      // an unblocked, uncontested link between two cells carries a word every five clocks
      $display("shortest gap between words on an inner link: %0d clocks", min_gap);
      checks++; if (min_gap != 5) begin failures++; $display("expected a shortest gap of 5 clocks"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
