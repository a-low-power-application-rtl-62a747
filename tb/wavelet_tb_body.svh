// wavelet_tb_body.svh: end-to-end test of wavelet_asic, shared by
// tb_wavelet_asic (small image) and tb_wavelet_full (512 x 512 defaults).
// The including module defines localparam IMG and instantiates the chip as
// `dut`; this body provides the clock, the RAM model, the stimulus and the
// checks:
//   1. a random image is loaded into RAM, the transform half is run with a
//      delayed bus grant, and the RAM is compared word for word with the
//      reference model (haar_ref_pkg), the cycle count with the state
//      budget, and the words around the image for stray writes;
//   2. the inverse half is run on the result and compared the same way;
//   3. the state pins are compared with the selected state machine.
// Mechanisms that must occur at least once are counted: bus wait,
// register-file copy-out, each quantize rule, clamping, inverse results
// routed to the register file and straight to RAM, the mode switch and each
// state_choice value.

  import haar_ref_pkg::*;

  localparam int OFF    = 10;
  localparam int LEVELS = 3;
  localparam int NPIX   = IMG * IMG;

  logic       clk = 1'b0;
  logic       reset, trans_inv, busgrant_n;
  logic [1:0] state_choice;
  logic       busreq_n, ready, done, data_oe, memstrobe, memwrsel;
  logic [18:0] addr;
  logic [7:0]  data_in, data_out;
  logic [4:0]  state_out;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sram_model #(.DEPTH(NPIX + OFF + 16)) ram (
    .clk, .strobe(memstrobe), .rd(memwrsel), .addr, .wdata(data_out), .rdata(data_in)
  );

  byte orig[], ref_img[];

  // ---------------- mechanism counters ----------------
  longint bus_wait = 0, reg_copy = 0, clamps = 0, inv_to_reg = 0, inv_to_ram = 0;
  longint rule_seen[7];
  int     mode_switch = 0;
  int     choice_seen[4];

  // controller busy cycles: every state but bus request (0) and finished (7)
  longint busy_cycles = 0;
  always @(negedge clk) if (!reset && state_busy(trans_inv ? dut.u_tctrl.state : dut.u_ictrl.state))
    busy_cycles++;
  function automatic bit state_busy(input logic [4:0] s);
    return s != 5'd0 && s != 5'd7;
  endfunction

  always @(posedge clk) if (!reset) begin
    if (ready && busgrant_n) bus_wait++;
    if (dut.u_regfile.en && !dut.u_regfile.we && memstrobe && !memwrsel) reg_copy++;
    if (trans_inv && dut.u_tcol.haar_en) begin
      rule_seen[dut.u_tcol.s_rule]++;
      rule_seen[dut.u_tcol.w_rule]++;
      if (quant_round(int'(dut.u_tcol.w_raw), int'(dut.u_tcol.w_rule)) != int'(dut.u_tcol.w_q) ||
          quant_round(int'(dut.u_tcol.s_raw), int'(dut.u_tcol.s_rule)) != int'(dut.u_tcol.s_q))
        clamps++;
    end
    // inverse engines' write states WR0..WR3 are encoded 9..12
    if (!trans_inv && (dut.u_irow.state inside {[5'd9:5'd12]} || dut.u_icol.state inside {[5'd9:5'd12]})) begin
      if (dut.u_regfile.en && dut.u_regfile.we) inv_to_reg++;
      else if (memstrobe && !memwrsel) inv_to_ram++;
    end
  end

  // state pins follow the selected machine
  always @(negedge clk) if (!reset) begin
    logic [4:0] exp_st;
    case (state_choice)
      2'b01:   exp_st = trans_inv ? dut.u_trow.state : dut.u_irow.state;
      2'b10:   exp_st = trans_inv ? dut.u_tcol.state : dut.u_icol.state;
      default: exp_st = trans_inv ? dut.u_tctrl.state : dut.u_ictrl.state;
    endcase
    checks++;
    if (state_out !== exp_st) begin
      failures++;
      if (failures < 10) $display("state pins %0d, expected %0d (choice %0d)", state_out, exp_st, state_choice);
    end
    choice_seen[state_choice]++;
    // the chip drives the data bus only while it writes
    checks++;
    if (data_oe !== (memstrobe && !memwrsel)) begin
      failures++;
      if (failures < 10) $display("data_oe %b with strobe %b rd %b", data_oe, memstrobe, memwrsel);
    end
  end

  // cycle with the state choice changing now and then
  always @(posedge clk) if (cyc % 997 == 0) state_choice <= state_choice + 2'd1;

  function automatic void fill_guard();
    for (int i = 0; i < OFF; i++) ram.mem[i] = 8'hA5;
    for (int i = OFF + NPIX; i < NPIX + OFF + 16; i++) ram.mem[i] = 8'h5A;
  endfunction

  task automatic check_guard(input string what);
    int bad = 0;
    for (int i = 0; i < OFF; i++) if (ram.mem[i] != 8'hA5) bad++;
    for (int i = OFF + NPIX; i < NPIX + OFF + 16; i++) if (ram.mem[i] != 8'h5A) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%s: %0d words outside the image were written", what, bad);
    end
  endtask

  task automatic compare_image(input string what);
    int bad = 0;
    for (int i = 0; i < NPIX; i++) begin
      checks++;
      if (byte'(ram.mem[OFF + i]) != ref_img[i]) begin
        bad++;
        failures++;
        if (bad <= 8) $display("%s: pixel (%0d,%0d) = %0d, expected %0d", what, i / IMG, i % IMG,
                               byte'(ram.mem[OFF + i]), ref_img[i]);
      end
    end
    $display("%s: %0d of %0d words differ", what, bad, NPIX);
  endtask

  task automatic run_half(input bit fwd, input int grant_delay, output longint cycles);
    trans_inv  = fwd;
    busgrant_n = 1'b1;
    reset      = 1'b1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    repeat (grant_delay) @(posedge clk);
    checks++;
    if (busreq_n !== 1'b0 || ready !== 1'b1 || memstrobe !== 1'b0) begin
      failures++;
      $display("bus request phase wrong: busreq_n=%b ready=%b strobe=%b", busreq_n, ready, memstrobe);
    end
    #1 busgrant_n = 1'b0;
    @(posedge clk);
    busy_cycles = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    cycles = busy_cycles;
    checks++;
    if (busreq_n !== 1'b1) begin
      failures++;
      $display("bus not released at the end");
    end
  endtask

  initial begin
    longint cyc_fwd, cyc_inv, exp_fwd, exp_inv, exp_acc;
    longint abs_err;
    reset        = 1'b1;
    trans_inv    = 1'b1;
    busgrant_n   = 1'b1;
    state_choice = 2'b00;

    orig = new[NPIX];
    for (int i = 0; i < NPIX; i++) begin
      // smooth ramps plus noise and a few strong edges, kept in -127..127
      int v = ((i % IMG) * 3 + (i / IMG) * 2) % 200 - 100 + int'($urandom_range(0, 20)) - 10;
      if ($urandom_range(0, 15) == 0) v = int'($urandom_range(0, 254)) - 127;
      if (v > 127) v = 127;
      if (v < -127) v = -127;
      orig[i] = byte'(v);
      ram.mem[OFF + i] = orig[i];
    end
    fill_guard();

    // ---- transform ----
    ref_img = new[NPIX](orig);
    for (int l = 0; l < LEVELS; l++) fwd_level(ref_img, IMG, l);
    run_half(1'b1, 7, cyc_fwd);
    compare_image("transform");
    check_guard("transform");
    exp_fwd = 1;
    for (int l = 0; l < LEVELS; l++)
      exp_fwd += 1 + fwd_row_cycles(IMG >> l) + 1 + fwd_col_cycles(IMG >> l) + 1;
    checks++;
    if (cyc_fwd != exp_fwd) begin
      failures++;
      $display("transform took %0d cycles, expected %0d", cyc_fwd, exp_fwd);
    end
    $display("transform: %0d cycles, %0d RAM reads, %0d RAM writes", cyc_fwd, ram.n_reads, ram.n_writes);
    // every pass reads and writes each word of its corner exactly once
    exp_acc = 0;
    for (int l = 0; l < LEVELS; l++) exp_acc += 2 * longint'(IMG >> l) * longint'(IMG >> l);
    checks++;
    if (ram.n_reads != exp_acc || ram.n_writes != exp_acc) begin
      failures++;
      $display("RAM accesses %0d reads / %0d writes, expected %0d each", ram.n_reads, ram.n_writes, exp_acc);
    end

    // ---- inverse transform on the transformed image ----
    mode_switch++;
    for (int l = LEVELS - 1; l >= 0; l--) inv_level(ref_img, IMG, l);
    run_half(1'b0, 3, cyc_inv);
    compare_image("inverse");
    check_guard("inverse");
    exp_inv = 1;
    for (int l = LEVELS - 1; l >= 0; l--) exp_inv += 1 + inv_cycles(IMG >> l) + 1 + inv_cycles(IMG >> l) + 1;
    checks++;
    if (cyc_inv != exp_inv) begin
      failures++;
      $display("inverse took %0d cycles, expected %0d", cyc_inv, exp_inv);
    end
    abs_err = 0;
    for (int i = 0; i < NPIX; i++)
      abs_err += (orig[i] > byte'(ram.mem[OFF + i])) ? orig[i] - byte'(ram.mem[OFF + i])
                                                      : byte'(ram.mem[OFF + i]) - orig[i];
    $display("inverse: %0d cycles; mean absolute error against the original image %0d/1000",
             cyc_inv, abs_err * 1000 / NPIX);

    // ---- mechanisms ----
    $display("bus wait %0d, register copy-out %0d, clamps %0d, inverse to regfile %0d, to RAM %0d",
             bus_wait, reg_copy, clamps, inv_to_reg, inv_to_ram);
    $display("rules seen: %0d %0d %0d %0d %0d %0d %0d", rule_seen[0], rule_seen[1], rule_seen[2],
             rule_seen[3], rule_seen[4], rule_seen[5], rule_seen[6]);
    checks += 5;
    if (bus_wait == 0)   begin failures++; $display("bus wait never happened"); end
    if (reg_copy == 0)   begin failures++; $display("register copy-out never happened"); end
    if (clamps == 0)     begin failures++; $display("clamping never happened"); end
    if (inv_to_reg == 0 || inv_to_ram == 0) begin failures++; $display("inverse write routing not exercised"); end
    if (mode_switch == 0) begin failures++; $display("mode switch never happened"); end
    for (int r = 0; r < 7; r++) begin
      checks++;
      if (rule_seen[r] == 0) begin failures++; $display("quantize rule %0d never used", r); end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (choice_seen[c] == 0) begin failures++; $display("state choice %0d never shown", c); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
