// ctrl_tb_body.svh: shared checking body for the two top-level controllers.
// The including module sets FWD (1 = transform controller, first pass on
// rows, levels counting up; 0 = inverse controller, first pass on columns,
// levels counting down) and instantiates the controller as `dut` after this
// include. The row and column engines are replaced by stand-ins that take a
// random number of cycles and place a recognisable request on their buses.
//
// Checked: the bus request is held from reset until the end; nothing starts
// before the grant, however late it comes; passes are started in the right
// order with the right level and never overlap; the request buses reach the
// memory side from whichever engine owns the current pass; ready and done;
// and the exact cycle count 1 + sum over levels of (3 + first + second pass)
// from grant to the finished state.

  import wavelet_pkg::*;

  localparam int LEVELS = 3;

  logic     clk = 1'b0;
  logic     rst;
  logic     busgrant_n;
  logic     busreq_n, ready, done;
  logic [1:0] level;
  logic     row_start, col_start, row_done, col_done;
  logic [STATE_W-1:0] state;
  mem_req_t row_mem, col_mem, mem_req;
  reg_req_t row_reg, col_reg, reg_req;

  int checks = 0, failures = 0;
  int row_cnt = 0, col_cnt = 0;     // stand-in countdowns
  int row_lat, col_lat;             // latencies of the current passes
  int wait_sum;                     // sum of the latencies of one run
  int passes [$];                   // log: 0 = row pass, 1 = column pass
  int levels [$];

  always #5 clk = ~clk;

  // stand-in engines
  always @(posedge clk) begin
    if (rst) row_cnt <= 0;
    else if (row_start) begin
      row_lat = $urandom_range(1, 20);
      wait_sum += row_lat;
      passes.push_back(0);
      levels.push_back(int'(level));
      row_cnt <= row_lat;
    end else if (row_cnt > 0) row_cnt <= row_cnt - 1;
    if (rst) col_cnt <= 0;
    else if (col_start) begin
      col_lat = $urandom_range(1, 20);
      wait_sum += col_lat;
      passes.push_back(1);
      levels.push_back(int'(level));
      col_cnt <= col_lat;
    end else if (col_cnt > 0) col_cnt <= col_cnt - 1;
  end
  assign row_done = (row_cnt == 1);
  assign col_done = (col_cnt == 1);

  // recognisable request patterns
  assign row_mem = '{strobe: 1'b1, rd: 1'b1, addr: 19'h1_2345, wdata: 8'h11};
  assign col_mem = '{strobe: 1'b1, rd: 1'b0, addr: 19'h5_4321, wdata: 8'h22};
  assign row_reg = '{en: 1'b1, we: 1'b1, addr: 10'h155, wdata: 8'h33};
  assign col_reg = '{en: 1'b1, we: 1'b0, addr: 10'h0aa, wdata: 8'h44};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  // per-cycle checks
  always @(negedge clk) if (!rst) begin
    check(!(row_cnt > 0 && col_cnt > 0), "row and column passes overlap");
    check(!(row_start && col_start), "two starts at once");
    if (row_cnt > 0 || row_start)
      check(mem_req == row_mem && reg_req == row_reg, "row pass does not own the buses");
    if (col_cnt > 0 || col_start)
      check(mem_req == col_mem && reg_req == col_reg, "column pass does not own the buses");
    check(busreq_n == done, "bus request not held until done");
  end

  task automatic run(input int grant_delay);
    int cyc;
    int first, second;
    passes.delete();
    levels.delete();
    wait_sum   = 0;
    busgrant_n = 1'b1;
    rst        = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(negedge clk);
    check(ready && !busreq_n && !done, "not ready and requesting after reset");
    repeat (grant_delay) begin
      @(negedge clk);
      check(ready && !row_start && !col_start && row_cnt == 0 && col_cnt == 0,
            "work begins before the grant");
    end
    busgrant_n = 1'b0;
    @(posedge clk);              // REQ -> INIT
    cyc = 0;
    #1;
    while (!done && cyc < 10000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    busgrant_n = 1'b1;
    check(cyc == 1 + 3 * LEVELS + wait_sum,
          $sformatf("run took %0d cycles, expected %0d", cyc, 1 + 3 * LEVELS + wait_sum));
    check(passes.size() == 2 * LEVELS, $sformatf("%0d passes, expected %0d", passes.size(), 2 * LEVELS));
    first  = FWD ? 0 : 1;
    second = 1 - first;
    for (int i = 0; i < passes.size() && i < 2 * LEVELS; i++) begin
      int exp_lvl;
      exp_lvl = FWD ? i / 2 : LEVELS - 1 - i / 2;
      check(passes[i] == ((i % 2) ? second : first), $sformatf("pass %0d of the wrong kind", i));
      check(levels[i] == exp_lvl, $sformatf("pass %0d at level %0d, expected %0d", i, levels[i], exp_lvl));
    end
    // the finished state holds, with the bus released
    repeat (5) begin
      @(negedge clk);
      check(done && busreq_n && !ready && !row_start && !col_start, "finished state not held");
    end
  endtask

  initial begin
    run(0);
    run(7);
    for (int i = 0; i < 20; i++) run($urandom_range(0, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
