// tb_frame_workload: one synthetic 640x480 frame through the whole memory
// channel at default sizes.
//
// Graphics traffic is approximated by a raster sweep: for every 8-pixel
// span (32 bytes at 4 bytes per pixel, one burst) the stream reads the depth
// buffer, writes the depth buffer, writes the colour buffer and reads one
// texture burst from a texture that is walked with 2-D locality. The three
// surfaces live 4 MiB apart. Every read is checked against a reference
// memory; the run reports throughput (at a 200 MHz DRAM clock), page-hit
// rate and the fraction of time in precharge power-down. FRAME_LINES can be
// lowered for a quicker run.
module tb_frame_workload;
  import mc_pkg::*;

  function automatic logic [DATA_W-1:0] rand_data();
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DATA_W / 32; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction

  localparam int unsigned NB = NUM_BANKS;
  localparam int WIDTH = 640, FRAME_LINES = 480, BPP = 4;
  localparam int SPAN_BYTES = DATA_W / 8;
  localparam logic [ADDR_W-1:0] COLOUR_BASE = 29'h000_0000;
  localparam logic [ADDR_W-1:0] DEPTH_BASE  = 29'h040_0000;
  localparam logic [ADDR_W-1:0] TEX_BASE    = 29'h080_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid = 1'b0, req_ready, req_we = 1'b0, flush = 1'b0;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [DATA_W-1:0] req_wdata = '0;
  logic [TAG_W-1:0]  req_tag = '0;
  logic [NB-1:0]     resp_valid, bk_act, bk_pre, bk_rd, bk_wr;
  logic [DATA_W-1:0] resp_data [NB];
  logic [TAG_W-1:0]  resp_tag  [NB];
  logic [ROW_W-1:0]  bk_row    [NB];
  logic [COL_W-1:0]  bk_col    [NB];
  logic [DATA_W-1:0] bk_wdata  [NB], bk_rdata [NB];
  logic              cke, group_active, group_formed, q_full, protocol_err;
  pwr_state_e        pwr_state;

  rfi_gpu_mem_system dut (.*);

  dram_bank_model u_banks (
    .clk, .bk_act, .bk_pre, .bk_rd, .bk_wr, .bk_row, .bk_col, .bk_wdata, .bk_rdata
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #(10 * 4000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] exp_data [256];
  bit                pending [256];
  int                outstanding = 0, tagc = 0, n_reads = 0, n_writes = 0;

  function automatic logic [DATA_W-1:0] ref_read(logic [ADDR_W-1:0] a);
    logic [ROW_W-1:0] r;
    logic [COL_W-1:0] c;
    int               b;
    r = a[OFF_W+COL_W+BANK_W +: ROW_W];
    c = a[OFF_W +: COL_W];
    b = int'(a[OFF_W+COL_W +: BANK_W]);
    if (ref_mem.exists(a)) return ref_mem[a];
    return DATA_W'({32'hD0A0_0000 | 32'(b), 8'h00, 24'({r, c})} ^ 64'h0123_4567_0000_0000);
  endfunction

  task automatic send(logic [ADDR_W-1:0] a, bit we);
    logic [TAG_W-1:0] t;
    t = TAG_W'(tagc); tagc++;
    @(negedge clk);
    req_valid = 1'b1; req_addr = a; req_we = we; req_tag = t; req_wdata = rand_data();
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    if (we) begin ref_mem[a] = req_wdata; n_writes++; end
    else begin
      check(!pending[t], "tag free");
      exp_data[t] = ref_read(a); pending[t] = 1'b1; outstanding++; n_reads++;
    end
    #1 req_valid = 1'b0;
  endtask

  always @(posedge clk) for (int b = 0; b < NB; b++) if (resp_valid[b]) begin
    check(pending[resp_tag[b]] && resp_data[b] == exp_data[resp_tag[b]], "read data");
    pending[resp_tag[b]] = 1'b0; outstanding--;
  end

  longint n_cycles = 0, n_pre_pdn = 0;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (pwr_state == P_PRE_PDN) n_pre_pdn++;
  end

  initial begin
    logic [ADDR_W-1:0] off, tex;
    foreach (pending[i]) pending[i] = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    for (int y = 0; y < FRAME_LINES; y++) begin
      for (int x = 0; x < WIDTH * BPP; x += SPAN_BYTES) begin
        off = ADDR_W'(y * WIDTH * BPP + x);
        // Texture: 256x256 texels of 4 bytes, sampled at half resolution.
        tex = TEX_BASE + ADDR_W'((((y / 2) % 256) * 256 * BPP) + ((x / 2) % (256 * BPP)));
        tex[OFF_W + 1:0] = '0;
        send(DEPTH_BASE + off, 1'b0);
        send(DEPTH_BASE + off, 1'b1);
        send(COLOUR_BASE + off, 1'b1);
        send(tex, 1'b0);
      end
    end
    flush = 1'b1;
    while (outstanding != 0 || dut.u_mc.q_valid != '0 || group_active) @(posedge clk);
    flush = 1'b0;
    repeat (10) @(posedge clk);
    check(outstanding == 0, "all reads answered");
    check(!protocol_err, "no DRAM protocol error");
    check(u_banks.violations == 0, "no DRAM timing violation");
    check(n_pre_pdn > 0, "precharge power-down used");
    $display("frame lines=%0d transactions=%0d (reads %0d, writes %0d) cycles=%0d",
             FRAME_LINES, n_reads + n_writes, n_reads, n_writes, n_cycles);
    $display("throughput=%0d MB/s at 200 MHz, page hit rate=%0d%%, precharge power-down=%0d%% of cycles",
             longint'(n_reads + n_writes) * SPAN_BYTES * 200 / n_cycles,
             100 * (u_banks.col_cmds - u_banks.activates) / u_banks.col_cmds,
             100 * n_pre_pdn / n_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
