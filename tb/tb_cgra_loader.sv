// tb_cgra_loader: self-checking test of the CGRA control interface and
// program loader. A random kernel image is placed in a memory model with
// randomly delayed grants; the test programs KADDR/KROWS, issues LOAD and
// checks every configuration and instruction-memory write against the image,
// the number of image words read, the STATUS bits, that START is refused
// while loading, the start pulse, the CYCLES counter against a modelled
// kernel run, and the interrupt pulse.
module tb_cgra_loader;
  import bw_pkg::*;
  import tb_kernel_pkg::*;
  localparam logic [31:0] KADDR = 32'h0020_0100;
  localparam int ROWS = 6, RUN_CYCLES = 37;
  logic clk = 0, rst_n = 0;
  bus_req_t s_req, m_req;
  bus_rsp_t s_rsp, m_rsp;
  logic cfg_we, im_we, start, irq;
  logic [4:0] cfg_idx;
  fu_cfg_t cfg_data;
  logic [3:0] im_idx;
  logic [7:0] im_addr;
  imm_instr_t im_data;
  logic running = 0, done = 0;
  logic [31:0] img [$];
  logic [31:0] got_cfg [NUM_FU];
  logic [32:0] got_im [11][ROWS];
  int checks = 0, failures = 0, words_read = 0, starts = 0, irqs = 0;
  logic gnt_ok;

  cgra_loader dut (.*);
  always #5 clk = ~clk;

  // Image memory model.
  always_ff @(posedge clk) gnt_ok <= 1'($urandom);
  assign m_rsp.gnt = m_req.req && gnt_ok;
  always_ff @(posedge clk) begin
    m_rsp.rvalid <= m_req.req && m_rsp.gnt;
    if (m_req.req && m_rsp.gnt) begin
      m_rsp.rdata <= img[(m_req.addr - KADDR) / 4];
      words_read  <= words_read + 1;
    end
  end

  // Capture what the loader writes into the fabric, and model a kernel run.
  always @(negedge clk) begin
    if (cfg_we) got_cfg[cfg_idx] = {18'd0, cfg_data};
    if (im_we && int'(im_addr) < ROWS) got_im[im_idx][3'(im_addr)] = im_data;
    if (start) starts++;
    if (irq) irqs++;
  end
  initial begin
    forever begin
      @(posedge clk);
      if (start && rst_n) begin
        running <= 1;
        repeat (RUN_CYCLES) @(posedge clk);
        running <= 0; done <= 1;
        @(posedge clk) done <= 0;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    s_req = '{req: 1, we: 1, be: 4'hF, addr: 32'h0030_0000 + a, wdata: d};
    @(negedge clk);
    s_req.req = 0;
  endtask

  task automatic bus_rd(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    s_req = '{req: 1, we: 0, be: 4'hF, addr: 32'h0030_0000 + a, wdata: 0};
    @(negedge clk);
    s_req.req = 0;
    d = s_rsp.rdata;
  endtask

  initial begin
    automatic cgra_kernel k = new();
    logic [31:0] d;
    int guard;
    s_req = '0; m_rsp.rvalid = 0; m_rsp.rdata = 0;
    k.randomize_all(ROWS);
    k.image(img);
    repeat (2) @(posedge clk);
    rst_n = 1;
    bus_wr(32'h08, KADDR);
    bus_wr(32'h0C, ROWS);
    bus_rd(32'h08, d); chk(d == KADDR, "KADDR readback");
    bus_rd(32'h0C, d); chk(d == ROWS, "KROWS readback");
    bus_wr(32'h00, 32'h1);                       // LOAD
    bus_rd(32'h04, d); chk(d[0] == 1, "STATUS.loading during load");
    bus_wr(32'h00, 32'h2);                       // START while loading: refused
    guard = 0;
    do begin bus_rd(32'h04, d); guard++; end while (d[0] && guard < 2000);
    chk(starts == 0, "START refused while loading");
    chk(words_read == int'(NUM_FU) + ROWS * int'(WORDS_PER_ROW),
        $sformatf("image words read %0d", words_read));
    for (int f = 0; f < int'(NUM_FU); f++) chk(got_cfg[f] == k.cfg[f], $sformatf("cfg %0d", f));
    for (int r = 0; r < ROWS; r++) begin
      for (int m = 0; m < 9; m++) chk(got_im[m][r] == {21'd0, k.im[m][r]}, $sformatf("im%0d row %0d", m, r));
      for (int u = 0; u < 2; u++) chk(got_im[9 + u][r] == k.iu[u][r], $sformatf("iu%0d row %0d", u, r));
    end
    // Two runs of the resident kernel.
    for (int run = 0; run < 2; run++) begin
      bus_wr(32'h00, 32'h2);
      bus_rd(32'h04, d); chk(d[1] == 1 && d[2] == 0, "STATUS running, done cleared");
      guard = 0;
      do begin bus_rd(32'h04, d); guard++; end while (!d[2] && guard < 2000);
      bus_rd(32'h10, d); chk(d == RUN_CYCLES, $sformatf("CYCLES %0d", d));
    end
    chk(starts == 2, $sformatf("start pulses %0d", starts));
    chk(irqs == 2, $sformatf("irq pulses %0d", irqs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
