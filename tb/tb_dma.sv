// Testbench for dma: two write channels fill memory regions concurrently
// from random-valid streams, then two read channels read them back to
// random-ready sinks while a third transfer writes again. The memory model
// grants requests at random and returns read data in order after a random
// delay of 1-4 cycles. Checks: every word lands at its address, every read
// word matches, busy falls after each transfer, both channel kinds were
// served in interleaved bursts (round robin), and no read FIFO overflowed.
// Small FIFOs and bursts so that the request rules are exercised often.
module tb_dma;
  localparam int NR = 2, NW = 2, NC = 4, DW = 8, AW = 12, FD = 16, BU = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0] start = '0, busy;
  logic [AW-1:0] cfg_base [NC], cfg_len [NC];
  logic [NR-1:0] rd_valid, rd_ready = '0;
  logic [DW-1:0] rd_data [NR];
  logic [NW-1:0] wr_valid = '0, wr_ready;
  logic [DW-1:0] wr_data [NW];
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;

  dma #(.NR(NR), .NW(NW), .DW(DW), .AW(AW), .FIFO_DEPTH(FD), .BURST(BU)) dut (.*);

  int checks = 0, fails = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin fails++; if (fails < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------- memory model
  logic [DW-1:0] mem [1 << AW];
  logic [DW-1:0] rq_d [$];
  int            rq_t [$];
  int            cyc = 0;
  assign mem_gnt = mem_req && ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && mem_req && mem_gnt) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else begin rq_d.push_back(mem[mem_addr]); rq_t.push_back(cyc + $urandom_range(1, 4)); end
    end
  end
  always @(negedge clk) begin
    mem_rvalid = 1'b0; mem_rdata = 'x;
    if (rq_t.size() > 0 && rq_t[0] <= cyc) begin
      mem_rvalid = 1'b1; mem_rdata = rq_d.pop_front(); void'(rq_t.pop_front());
    end
  end

  // ----------------------------------------------- burst order (mechanism)
  int switches = 0, rd_bursts = 0, wr_bursts = 0;
  logic [1:0] last_cur;
  always @(posedge clk) if (rst_n && int'(dut.st) == 0 && dut.pick_v &&
                            (dut.pend[dut.rcv] == 0 || (mem_rvalid && dut.pend[dut.rcv] == 1))) begin
    if (dut.pick != last_cur) switches++;
    last_cur <= dut.pick;
    if (int'(dut.pick) < NR) rd_bursts++; else wr_bursts++;
  end

  // ------------------------------------------------------------- streams
  int wlen [NW] = '{50, 37};
  int wbase [NW] = '{100, 300};
  int wsent [NW] = '{0, 0};
  int rgot [NR] = '{0, 0};
  function automatic logic [DW-1:0] pat(int ch, int i);
    return DW'(ch * 97 + i * 13 + 5);
  endfunction

  initial begin
    for (int c = 0; c < NC; c++) begin cfg_base[c] = '0; cfg_len[c] = '0; end
    wr_data[0] = '0; wr_data[1] = '0;
    for (int a = 0; a < (1 << AW); a++) mem[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- phase 1: two write transfers at once
    for (int w = 0; w < NW; w++) begin
      cfg_base[NR + w] = AW'(wbase[w]); cfg_len[NR + w] = AW'(wlen[w]);
    end
    start = 4'b1100;
    @(negedge clk); start = '0;
    while (wsent[0] < wlen[0] || wsent[1] < wlen[1] || busy[3:2] != 0) begin
      // present data at negedge, take the handshake at the next posedge
      for (int w = 0; w < NW; w++) begin
        wr_valid[w] = (wsent[w] < wlen[w]) && ($urandom_range(0, 3) != 0);
        wr_data[w]  = pat(w, wsent[w]);
      end
      @(posedge clk);
      for (int w = 0; w < NW; w++) if (wr_valid[w] && wr_ready[w]) wsent[w]++;
      @(negedge clk);
    end
    wr_valid = '0;
    for (int w = 0; w < NW; w++)
      for (int i = 0; i < wlen[w]; i++)
        chk(mem[wbase[w] + i] == pat(w, i), $sformatf("write ch%0d word %0d: %0d", w, i, mem[wbase[w] + i]));
    chk(mem[wbase[0] + wlen[0]] == 0 && mem[wbase[0] - 1] == 0, "write outside its region");
    chk(switches >= 4 && wr_bursts >= 10, $sformatf("write bursts not interleaved (%0d switches)", switches));
    // ---- phase 2: read both regions back, while channel 2 writes again
    for (int r = 0; r < NR; r++) begin
      cfg_base[r] = AW'(wbase[r]); cfg_len[r] = AW'(wlen[r]);
    end
    cfg_base[2] = AW'(600); cfg_len[2] = AW'(20); wsent[0] = 0; wlen[0] = 50;
    start = 4'b0111;
    @(negedge clk); start = '0;
    while (rgot[0] < 50 || rgot[1] < 37 || wsent[0] < 20 || busy != 0) begin
      rd_ready = NR'($urandom_range(0, 3));
      wr_valid[0] = (wsent[0] < 20) && ($urandom_range(0, 1) != 0);
      wr_data[0]  = pat(7, wsent[0]);
      @(posedge clk);
      if (wr_valid[0] && wr_ready[0]) wsent[0]++;
      for (int r = 0; r < NR; r++)
        if (rd_valid[r] && rd_ready[r]) begin
          chk(rd_data[r] == pat(r, rgot[r]), $sformatf("read ch%0d word %0d: %0d", r, rgot[r], rd_data[r]));
          rgot[r]++;
        end
      @(negedge clk);
      if (cyc > 20000) break;
    end
    rd_ready = '0; wr_valid = '0;
    repeat (10) @(negedge clk);
    chk(rgot[0] == 50 && rgot[1] == 37, $sformatf("read counts %0d %0d", rgot[0], rgot[1]));
    chk(rd_valid == 0, "extra read data");
    for (int i = 0; i < 20; i++) chk(mem[600 + i] == pat(7, i), $sformatf("second write word %0d", i));
    chk(rd_bursts >= 10, $sformatf("read bursts %0d", rd_bursts));
    chk(dut.f_ovf == 0, "FIFO overflow");
    chk(busy == 0, "busy after the transfers");
    $display("bursts: read %0d write %0d, channel switches %0d", rd_bursts, wr_bursts, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, fails);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, fails + 1);
    $finish;
  end
endmodule
