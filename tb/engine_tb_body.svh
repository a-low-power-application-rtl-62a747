// engine_tb_body.svh: test of one transform engine against the reference
// model, shared by the four engine testbenches. The including module
// defines localparam IMG and KIND (0 row transform, 1 column transform,
// 2 column inverse, 3 row inverse) and instantiates the engine as `dut`
// with the signals below. For each level 0..2 a fresh random image is put
// in the RAM model, the engine is started, and the whole RAM is compared
// with the reference; the cycle count of the pass (cycles with busy high)
// must match the engine's state budget, and the register file must have
// been copied out once per line.

  import haar_ref_pkg::*;
  import wavelet_pkg::*;

  localparam int OFF  = 10;
  localparam int NPIX = IMG * IMG;

  logic       clk = 1'b0;
  logic       rst, start, done, busy;
  logic [1:0] level;
  logic [4:0] state;
  mem_req_t   mem_req;
  reg_req_t   reg_req;
  logic [7:0] mem_rdata, reg_rdata;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_model #(.DEPTH(NPIX + OFF + 16)) ram (
    .clk, .strobe(mem_req.strobe), .rd(mem_req.rd), .addr(mem_req.addr),
    .wdata(mem_req.wdata), .rdata(mem_rdata)
  );

  regfile u_rf (
    .clk, .en(reg_req.en), .we(reg_req.we), .addr(reg_req.addr), .wdata(reg_req.wdata),
    .rdata(reg_rdata)
  );

  longint busy_cyc = 0, copies = 0, idle_bus = 0;
  always @(negedge clk) if (!rst) begin
    if (busy) busy_cyc++;
    if (reg_req.en && !reg_req.we && mem_req.strobe && !mem_req.rd) copies++;
    if (!busy && (mem_req.strobe || reg_req.en)) idle_bus++;
  end

  byte ref_img[];

  initial begin
    rst   = 1'b1;
    start = 1'b0;
    level = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int l = 0; l < 3; l++) begin
      int n;
      longint exp_cyc;
      n = IMG >> l;
      ref_img = new[NPIX];
      for (int i = 0; i < NPIX; i++) begin
        ref_img[i] = byte'(int'($urandom_range(0, 254)) - 127);
        ram.mem[OFF + i] = ref_img[i];
      end
      for (int i = 0; i < OFF; i++) ram.mem[i] = 8'hA5;
      case (KIND)
        0: fwd_rows(ref_img, IMG, l);
        1: fwd_cols(ref_img, IMG, l);
        2: inv_cols(ref_img, IMG, l);
        default: inv_rows(ref_img, IMG, l);
      endcase
      exp_cyc = (KIND == 0) ? fwd_row_cycles(n) : (KIND == 1) ? fwd_col_cycles(n) : inv_cycles(n);
      busy_cyc = 0;
      copies   = 0;
      @(posedge clk);
      #1 level = 2'(l);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      while (!done) @(posedge clk);
      @(negedge clk);
      @(negedge clk);
      begin
        int bad = 0;
        for (int i = 0; i < NPIX; i++) begin
          checks++;
          if (byte'(ram.mem[OFF + i]) != ref_img[i]) begin
            bad++;
            failures++;
            if (bad <= 5) $display("level %0d: word (%0d,%0d) = %0d, expected %0d", l, i / IMG,
                                   i % IMG, byte'(ram.mem[OFF + i]), ref_img[i]);
          end
        end
        for (int i = 0; i < OFF; i++) begin
          checks++;
          if (ram.mem[i] != 8'hA5) failures++;
        end
        $display("level %0d (%0d x %0d): %0d words differ, %0d cycles (expected %0d), %0d copies",
                 l, n, n, bad, busy_cyc, exp_cyc, copies);
      end
      checks += 3;
      if (busy_cyc != exp_cyc) failures++;
      if (copies != longint'(n) * (n / 2)) failures++;
      if (idle_bus != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: engine did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
