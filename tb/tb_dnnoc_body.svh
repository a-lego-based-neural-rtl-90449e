// Shared body of the DNNoC end-to-end testbenches (tb_dnnoc_top, tb_dnnoc_full).
// Expects N, NB, BATCH, LINES, GB_WORDS, T_A, T_B, T_MP, T_ADD, T_GAP, CYCLES
// and the macro DNNOC_TB_INST that instantiates dnnoc_top as dut.

  localparam int unsigned NODES      = N * N;
  localparam int unsigned GB_AW      = $clog2(GB_WORDS);
  localparam int unsigned NIN        = 2 * BATCH;            // dense-layer inputs
  localparam int unsigned BANK_WORDS = LINES * BATCH + NPARAM;
  localparam int unsigned GB_X = 0, GB_W = 256, GB_P = GB_W + 2 * NB * NIN + 64;
  localparam int unsigned GB_R = GB_P + 16 * NB;             // results

  function automatic int unsigned xof(input int unsigned id);
    int unsigned y;
    y = id / N;
    return (y % 2 == 0) ? id % N : N - 1 - id % N;
  endfunction
  localparam int unsigned XA = xof(T_A), YA = T_A / N;
  localparam int unsigned XM = xof(T_MP), YM = T_MP / N;
  localparam int unsigned XD = xof(T_ADD), YD = T_ADD / N;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic             cmd_valid = 1'b0, cmd_ready, idle;
  cmd_t             cmd = '0;
  logic [NODES-1:0] busy_tiles;
  logic             host_we = 1'b0, host_re = 1'b0;
  logic [GB_AW-1:0] host_addr = '0;
  data_t            host_wdata = '0, host_rdata;

  `DNNOC_TB_INST

  // ---------------------------------------------------------------- mechanisms
  int n_mcast_copy = 0, n_rle_run = 0, n_alloc_wait = 0, n_bn = 0, n_relu_clip = 0;
  int n_bcast_load = 0, n_iter = 0;

  always @(posedge clk) if (rst_n) begin
    // a head flit leaving the destination router both to its local port and onward
    if (dut.g_row[YM].g_col[XM].u_tile.u_rt.out_valid[P_LOCAL] &&
        (dut.g_row[YM].g_col[XM].u_tile.u_rt.out_valid & 5'b11110) != '0 &&
        flit_type_e'(dut.g_row[YM].g_col[XM].u_tile.u_rt.out_flit[P_LOCAL][$bits(dut.g_row[YM].g_col[XM].u_tile.u_rt.out_flit[0])-1 -: 2]) == FLIT_HEAD)
      n_mcast_copy++;
    // a body flit with a run longer than one leaving source tile A's packetizer
    if (dut.g_row[YA].g_col[XA].u_tile.u_ni.u_pkt.out_valid &&
        dut.g_row[YA].g_col[XA].u_tile.u_ni.u_pkt.out_ready &&
        dut.g_row[YA].g_col[XA].u_tile.u_ni.u_pkt.out_flit[$bits(dut.g_row[YA].g_col[XA].u_tile.u_ni.u_pkt.out_flit)-1 -: 2] == FLIT_BODY &&
        dut.g_row[YA].g_col[XA].u_tile.u_ni.u_pkt.out_flit[$clog2(NB)-1:0] != '0)
      n_rle_run++;
    // a head flit at the MP, Add or source-A tile's router waiting while its outputs are taken
    for (int p = 0; p < NPORTS; p++) begin
      if (dut.g_row[YM].g_col[XM].u_tile.u_rt.f_valid[p] &&
          dut.g_row[YM].g_col[XM].u_tile.u_rt.is_head[p] &&
          !dut.g_row[YM].g_col[XM].u_tile.u_rt.act_q[p] &&
          !(dut.g_row[YM].g_col[XM].u_tile.u_rt.grant_v &&
            dut.g_row[YM].g_col[XM].u_tile.u_rt.grant_p == 3'(p)))
        n_alloc_wait++;
      if (dut.g_row[YD].g_col[XD].u_tile.u_rt.f_valid[p] &&
          dut.g_row[YD].g_col[XD].u_tile.u_rt.is_head[p] &&
          !dut.g_row[YD].g_col[XD].u_tile.u_rt.act_q[p] &&
          !(dut.g_row[YD].g_col[XD].u_tile.u_rt.grant_v &&
            dut.g_row[YD].g_col[XD].u_tile.u_rt.grant_p == 3'(p)))
        n_alloc_wait++;
      if (dut.g_row[YA].g_col[XA].u_tile.u_rt.f_valid[p] &&
          dut.g_row[YA].g_col[XA].u_tile.u_rt.is_head[p] &&
          !dut.g_row[YA].g_col[XA].u_tile.u_rt.act_q[p] &&
          !(dut.g_row[YA].g_col[XA].u_tile.u_rt.grant_v &&
            dut.g_row[YA].g_col[XA].u_tile.u_rt.grant_p == 3'(p)))
        n_alloc_wait++;
    end
    if (dut.u_ctrl.db_we != '0 && dut.u_ctrl.db_bcast) n_bcast_load++;
  end

  // ---------------------------------------------------------------- stimulus
  data_t x_in  [NIN];
  data_t w_a   [NB][NIN];
  data_t w_b   [NB][NIN];
  data_t bn_p  [2][NB][4];
  data_t res_a [NB];
  data_t res_b [NB];
  cmd_t  q [$];

  function automatic data_t bn_relu(longint acc, data_t m, data_t g, data_t s, data_t b,
                                    output bit clipped);
    data_t r, c, t1, t2, y;
    r  = sat(acc >>> 8);
    c  = sat(longint'(r) - longint'(m));
    t1 = sat((longint'(c) * longint'(g)) >>> 8);
    t2 = sat((longint'(t1) * longint'(s)) >>> 8);
    y  = sat(longint'(t2) + longint'(b));
    clipped = y < 0;
    return (y < 0) ? data_t'(0) : y;
  endfunction

  function automatic cmd_t mk(cmd_op_e op, int unsigned tile, int unsigned a,
                              int unsigned b, int unsigned c);
    cmd_t k;
    k.op = op; k.tile = 8'(tile); k.a = a; k.b = b; k.c = c;
    return k;
  endfunction

  task automatic host_write(input int unsigned addr, input data_t d);
    @(negedge clk);
    host_we = 1'b1; host_addr = GB_AW'(addr); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(input int unsigned addr, output data_t d);
    @(negedge clk);
    host_re = 1'b1; host_addr = GB_AW'(addr);
    @(negedge clk);
    host_re = 1'b0;
    d = host_rdata;
  endtask

  task automatic run_cmds();
    while (q.size() > 0) begin
      @(negedge clk);
      cmd_valid = 1'b1;
      cmd = q.pop_front();
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
    end
    @(negedge clk);
    cmd_valid = 1'b0;
    @(posedge clk);
    while (!idle) @(posedge clk);
  endtask

  task automatic cfg(input int unsigned tile, input int unsigned r, input int unsigned v);
    q.push_back(mk(CMD_SETREG, tile, 0, v, r));
  endtask

  initial begin
    int start_cycle, end_cycle;
    data_t d;
    bit clip;
    longint acc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // inputs, weights (neurons 0 and 1 identical so that their results form a run),
    // BN parameters (upper half of the neurons pushed negative so ReLU clips them)
    for (int i = 0; i < NIN; i++) x_in[i] = data_t'($urandom % 1024) - data_t'(512);
    for (int j = 0; j < NB; j++)
      for (int i = 0; i < NIN; i++) begin
        w_a[j][i] = (j == 1) ? w_a[0][i] : data_t'($urandom % 256) - data_t'(128);
        w_b[j][i] = (j == 1) ? w_b[0][i] : data_t'($urandom % 256) - data_t'(128);
      end
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < NB; j++) begin
        bn_p[s][j][0] = data_t'($urandom % 256) - data_t'(128);   // mu
        bn_p[s][j][1] = data_t'(128 + $urandom % 256);            // gamma
        bn_p[s][j][2] = data_t'(128 + $urandom % 256);            // 1/sqrt(var+eps)
        bn_p[s][j][3] = (j >= NB / 2) ? -16'sd20000 : data_t'($urandom % 512);  // beta
        if (j == 1) for (int p = 0; p < 4; p++) bn_p[s][j][p] = bn_p[s][0][p];
      end

    for (int i = 0; i < NIN; i++) host_write(GB_X + i, x_in[i]);
    for (int j = 0; j < NB; j++)
      for (int i = 0; i < NIN; i++) begin
        host_write(GB_W + j * NIN + i, w_a[j][i]);
        host_write(GB_W + (NB + j) * NIN + i, w_b[j][i]);
      end
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < NB; j++)
        for (int p = 0; p < 4; p++) host_write(GB_P + (s * NB + j) * 4 + p, bn_p[s][j][p]);
    host_write(GB_P + 2 * NB * 4, data_t'(256 / NB));             // GAP reciprocal

    // ---------------- mapping iteration 1
    foreach (res_a[j]) begin
      acc = 0;
      for (int i = 0; i < NIN; i++) acc += longint'(x_in[i]) * longint'(w_a[j][i]);
      res_a[j] = bn_relu(acc, bn_p[0][j][0], bn_p[0][j][1], bn_p[0][j][2], bn_p[0][j][3], clip);
      if (clip) n_relu_clip++;
      acc = 0;
      for (int i = 0; i < NIN; i++) acc += longint'(x_in[i]) * longint'(w_b[j][i]);
      res_b[j] = bn_relu(acc, bn_p[1][j][0], bn_p[1][j][1], bn_p[1][j][2], bn_p[1][j][3], clip);
      if (clip) n_relu_clip++;
      if (bn_p[0][j][1] != 16'sd256) n_bn++;
    end
    for (int s = 0; s < 2; s++) begin
      int unsigned t;
      t = (s == 0) ? T_A : T_B;
      cfg(t, REG_ITERS, 2);
      cfg(t, REG_LAST_LANES, 0);
      cfg(t, REG_EXT, 3);
      cfg(t, REG_DEST, (1 << T_MP) | (1 << T_ADD));
      cfg(t, REG_RX_EXPECT, 0);
      cfg(t, REG_NRES, 0);
      q.push_back(mk(CMD_LOAD_DB, t, GB_X, NIN, 32'h8000_0000));
      for (int j = 0; j < NB; j++) begin
        q.push_back(mk(CMD_LOAD_WM, t, GB_W + (s * NB + j) * NIN, NIN, j * BANK_WORDS));
        q.push_back(mk(CMD_LOAD_WM, t, GB_P + (s * NB + j) * 4, 4, j * BANK_WORDS + LINES * BATCH));
      end
    end
    for (int s = 0; s < 2; s++) begin
      int unsigned t;
      t = (s == 0) ? T_MP : T_ADD;
      cfg(t, REG_ITERS, 1);
      cfg(t, REG_LAST_LANES, 2);
      cfg(t, REG_EXT, 0);
      cfg(t, REG_DEST, 0);
      cfg(t, REG_RX_BCAST, 0);
      cfg(t, REG_RX_EXPECT, 2 * NB);
      cfg(t, REG_RX_BASE0 + T_A, 0);
      cfg(t, REG_RX_BASE0 + T_B, NB);
    end
    q.push_back(mk(CMD_START, 0, (1 << T_A) | (1 << T_B) | (1 << T_MP) | (1 << T_ADD), 0, 0));
    q.push_back(mk(CMD_WAIT, 0, 0, 0, 0));
    q.push_back(mk(CMD_STORE, T_MP, GB_R, NB, 0));
    q.push_back(mk(CMD_STORE, T_ADD, GB_R + NB, NB, 0));
    start_cycle = $time / 10;
    run_cmds();
    end_cycle = $time / 10;
    n_iter++;
    $display("mapping iteration 1: %0d cycles", end_cycle - start_cycle);

    for (int j = 0; j < NB; j++) begin
      data_t e;
      host_read(GB_R + j, d);
      e = (res_a[j] > res_b[j]) ? res_a[j] : res_b[j];
      chk(d == e, $sformatf("MP result %0d = %0d, expected %0d", j, d, e));
      host_read(GB_R + NB + j, d);
      e = sat(longint'(res_a[j]) + longint'(res_b[j]));
      chk(d == e, $sformatf("Add result %0d = %0d, expected %0d", j, d, e));
    end

    // ---------------- mapping iteration 2: GAP over the Add results
    cfg(T_GAP, REG_ITERS, (NB + BATCH - 1) / BATCH);
    cfg(T_GAP, REG_LAST_LANES, NB % BATCH);
    cfg(T_GAP, REG_EXT, 0);
    cfg(T_GAP, REG_DEST, 0);
    cfg(T_GAP, REG_RX_EXPECT, 0);
    q.push_back(mk(CMD_LOAD_DB, T_GAP, GB_R + NB, NB, 32'h8000_0000));
    q.push_back(mk(CMD_LOAD_WM, T_GAP, GB_P + 2 * NB * 4, 1, LINES * BATCH + PRM_RECIP));
    q.push_back(mk(CMD_START, 0, 1 << T_GAP, 0, 0));
    q.push_back(mk(CMD_WAIT, 0, 0, 0, 0));
    q.push_back(mk(CMD_STORE, T_GAP, GB_R + 2 * NB, 1, 0));
    run_cmds();
    n_iter++;
    begin
      longint sum;
      data_t e;
      sum = 0;
      for (int j = 0; j < NB; j++) sum += longint'(sat(longint'(res_a[j]) + longint'(res_b[j])));
      e = sat((sum * longint'(256 / NB)) >>> 8);
      host_read(GB_R + 2 * NB, d);
      chk(d == e, $sformatf("GAP result = %0d, expected %0d", d, e));
    end

    $display("mechanisms: mcast_copy=%0d rle_run=%0d alloc_wait=%0d bn=%0d relu_clip=%0d bcast_load=%0d iterations=%0d",
             n_mcast_copy, n_rle_run, n_alloc_wait, n_bn, n_relu_clip, n_bcast_load, n_iter);
    chk(n_mcast_copy > 0, "multicast copy-and-forward happened");
    chk(n_rle_run > 0, "run-length run longer than one happened");
    chk(n_alloc_wait > 0, "a head flit waited for a busy output");
    chk(n_bn > 0, "batch norm with non-neutral parameters happened");
    chk(n_relu_clip > 0, "ReLU clipped a negative value");
    chk(n_bcast_load > 0, "broadcast load into a data buffer happened");
    chk(n_iter == 2, "two mapping iterations ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
