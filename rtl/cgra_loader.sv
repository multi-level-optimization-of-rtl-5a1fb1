// cgra_loader: control interface and program loader of the CGRA.
//
// Slave side (s_req/s_rsp, the control interface seen by the RISC-V core):
// always granted, read data one cycle later. Word registers at offset:
//   0x00 CTRL    write: bit0 LOAD kernel, bit1 START kernel (reads 0)
//   0x04 STATUS  read: bit0 loading, bit1 running, bit2 done (sticky,
//                cleared by START)
//   0x08 KADDR   byte address of the kernel image (read/write)
//   0x0C KROWS   number of instruction rows in the image (read/write)
//   0x10 CYCLES  cycles the last (or current) kernel run has taken
// Master side (m_req/m_rsp, the instruction interface): LOAD reads the image
// word by word from KADDR. The image is NUM_FU configuration words (a
// fu_cfg_t in bits [13:0] per FU, in FU index order), then KROWS rows of
// WORDS_PER_ROW words: nine words for the 12-bit IMs (bits [11:0]), then for
// each of the two IUs a word with bits [31:0] and a word with bit 32 in bit 0.
// Every word read is written at once to the fabric (cfg_we or im_we, im_idx
// 0..8 = 12-bit IMs, 9..10 = IUs). START, accepted only while neither loading
// nor running, pulses start to the fabric; irq pulses when the kernel halts.
// A resident kernel can be started again without reloading. The loader,
// control interface and interrupt line exist on the chip; the register map,
// image format and timing are this design's own.
module cgra_loader
  import bw_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  bus_req_t        s_req,
  output bus_rsp_t        s_rsp,
  output bus_req_t        m_req,
  input  bus_rsp_t        m_rsp,
  output logic            cfg_we,
  output logic [4:0]      cfg_idx,
  output fu_cfg_t         cfg_data,
  output logic            im_we,
  output logic [3:0]      im_idx,
  output logic [PC_W-1:0] im_addr,
  output imm_instr_t      im_data,
  output logic            start,
  input  logic            running,
  input  logic            done,
  output logic            irq
);
  typedef enum logic [1:0] {L_IDLE, L_REQ, L_WAIT} lstate_e;

  lstate_e     state;
  logic        in_cfg;
  logic [31:0] kaddr, krows, cycles, ptr;
  logic        done_flag;
  logic [4:0]  cfg_cnt;
  logic [3:0]  col;
  logic [31:0] row;
  logic [31:0] lo_word;
  logic        loading;
  logic        wr_ctrl;

  assign loading = (state != L_IDLE);
  assign wr_ctrl = s_req.req && s_req.we;

  // ---------------- slave register port ----------------
  assign s_rsp.gnt = s_req.req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rsp.rvalid <= 1'b0;
      s_rsp.rdata  <= '0;
      kaddr        <= '0;
      krows        <= '0;
    end else begin
      s_rsp.rvalid <= s_req.req;
      s_rsp.rdata  <= '0;
      if (s_req.req && !s_req.we) begin
        unique case (s_req.addr[4:2])
          3'd1:    s_rsp.rdata <= {29'd0, done_flag, running, loading};
          3'd2:    s_rsp.rdata <= kaddr;
          3'd3:    s_rsp.rdata <= krows;
          3'd4:    s_rsp.rdata <= cycles;
          default: s_rsp.rdata <= '0;
        endcase
      end
      if (wr_ctrl && s_req.addr[4:2] == 3'd2) kaddr <= s_req.wdata;
      if (wr_ctrl && s_req.addr[4:2] == 3'd3) krows <= s_req.wdata;
    end
  end

  // ---------------- run control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start     <= 1'b0;
      done_flag <= 1'b0;
      cycles    <= '0;
      irq       <= 1'b0;
    end else begin
      start <= 1'b0;
      irq   <= done;
      if (wr_ctrl && s_req.addr[4:2] == 3'd0 && s_req.wdata[1] && !loading && !running
          && !start) begin
        start     <= 1'b1;
        done_flag <= 1'b0;
        cycles    <= '0;
      end else if (running) begin
        cycles <= cycles + 32'd1;
      end
      if (done) done_flag <= 1'b1;
    end
  end

  // ---------------- program loader ----------------
  assign m_req.req   = (state == L_REQ);
  assign m_req.we    = 1'b0;
  assign m_req.be    = 4'hF;
  assign m_req.addr  = ptr;
  assign m_req.wdata = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= L_IDLE;
      in_cfg   <= 1'b0;
      ptr      <= '0;
      cfg_cnt  <= '0;
      col      <= '0;
      row      <= '0;
      lo_word  <= '0;
      cfg_we   <= 1'b0;
      cfg_idx  <= '0;
      cfg_data <= '0;
      im_we    <= 1'b0;
      im_idx   <= '0;
      im_addr  <= '0;
      im_data  <= '0;
    end else begin
      cfg_we <= 1'b0;
      im_we  <= 1'b0;
      unique case (state)
        L_IDLE: begin
          if (wr_ctrl && s_req.addr[4:2] == 3'd0 && s_req.wdata[0] && !running) begin
            state   <= L_REQ;
            in_cfg  <= 1'b1;
            ptr     <= kaddr;
            cfg_cnt <= '0;
            col     <= '0;
            row     <= '0;
          end
        end
        L_REQ: if (m_rsp.gnt) state <= L_WAIT;
        L_WAIT: begin
          if (m_rsp.rvalid) begin
            ptr   <= ptr + 32'd4;
            state <= L_REQ;
            if (in_cfg) begin
              cfg_we   <= 1'b1;
              cfg_idx  <= cfg_cnt;
              cfg_data <= fu_cfg_t'(m_rsp.rdata[13:0]);
              cfg_cnt  <= cfg_cnt + 5'd1;
              if (int'(cfg_cnt) == int'(NUM_FU) - 1) begin
                in_cfg <= 1'b0;
                if (krows == '0) state <= L_IDLE;
              end
            end else begin
              im_addr <= row[PC_W-1:0];
              if (col < 4'(NUM_IM12)) begin
                im_we   <= 1'b1;
                im_idx  <= col;
                im_data <= {21'd0, m_rsp.rdata[11:0]};
              end else if (col == 4'd9 || col == 4'd11) begin
                lo_word <= m_rsp.rdata;
              end else begin
                im_we   <= 1'b1;
                im_idx  <= (col == 4'd10) ? 4'd9 : 4'd10;
                im_data <= {m_rsp.rdata[0], lo_word};
              end
              if (int'(col) == int'(WORDS_PER_ROW) - 1) begin
                col <= '0;
                row <= row + 32'd1;
                if (row + 32'd1 == krows) state <= L_IDLE;
              end else begin
                col <= col + 4'd1;
              end
            end
          end
        end
        default: state <= L_IDLE;
      endcase
    end
  end

  // The image is read one word at a time: no response without a request.
  assert property (@(posedge clk) disable iff (!rst_n) m_rsp.rvalid |-> state == L_WAIT);
endmodule
