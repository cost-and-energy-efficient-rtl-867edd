// tb_icap_ctrl -- drives the HWICAP control state machine against a small
// register-level slave written here (8-word write FIFO, 4-word read FIFO,
// transfers that take several cycles). Checks that every streamed word reaches
// the port in order and that the FIFO is never overrun, that with a zero-wait
// slave words enter the FIFO at one per clock, that flushes close bursts
// early, and that readback returns exactly the requested words, in order,
// followed by rd_done. A second round repeats this with random wait states
// and a stalling producer.
module tb_icap_ctrl;
  import s6_device_pkg::*;
  import hwicap_regs_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n = 1;
  logic        wr_valid = 0, wr_flush = 0, wr_ready;
  word_t       wr_data = '0;
  logic        rd_start = 0, rd_valid, rd_done, idle;
  logic [15:0] rd_count = '0;
  word_t       rd_data;
  logic        ip_cs, ip_rnw, ip_ack;
  ip_addr_t    ip_addr;
  logic [31:0] ip_wdata, ip_rdata;

  icap_ctrl dut (.*);

  // asynchronous reset asserted by an edge, before the first clock edge
  initial #1 rst_n = 0;

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- slave ----------------
  localparam int WFD = 8, RFD = 4;
  word_t wf [$], rf [$], port_log [$];
  int    busy_cnt = 0, sz = 0, rd_gen = 0, rd_left = 0, overruns = 0, cr_writes = 0;
  bit    zero_wait = 1, ack_en = 1;
  assign ip_ack = ip_cs && (zero_wait || ack_en);

  always_comb begin
    case (ip_addr)
      HW_RF:   ip_rdata = rf.size() > 0 ? {16'h0, rf[0]} : 32'h0;
      HW_SR:   ip_rdata = {31'h0, busy_cnt == 0 && rd_left == 0};
      HW_WFV:  ip_rdata = 32'(WFD - wf.size());
      HW_RFO:  ip_rdata = 32'(rf.size());
      default: ip_rdata = 32'h0;
    endcase
  end

  always @(posedge clk) begin
    cycle++;
    ack_en <= ($urandom % 3 != 0);
    if (busy_cnt > 0) begin
      busy_cnt--;
      if (busy_cnt == 0) while (wf.size() > 0) port_log.push_back(wf.pop_front());
    end
    if (rd_left > 0 && rf.size() < RFD && ($urandom % 2 == 0)) begin
      rf.push_back(16'hA000 + 16'(rd_gen));
      rd_gen++;
      rd_left--;
    end
    if (ip_cs && ip_ack) begin
      if (!ip_rnw) begin
        case (ip_addr)
          HW_WF: if (wf.size() < WFD) wf.push_back(ip_wdata[15:0]); else overruns++;
          HW_SZ: sz = int'(ip_wdata);
          HW_CR: begin
            cr_writes++;
            if (ip_wdata[0]) busy_cnt = 2 * wf.size() + 1;
            if (ip_wdata[1]) rd_left = sz;
          end
          default: ;
        endcase
      end else if (ip_addr == HW_RF) void'(rf.pop_front());
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    wait (cycle > 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  word_t sent [$];
  int    accept_cycle [$];

  always @(posedge clk) if (wr_valid && wr_ready) accept_cycle.push_back(cycle);

  task automatic send(int n, bit stall, int flush_every);
    for (int i = 0; i < n; i++) begin
      while (stall && ($urandom % 3 == 0)) begin
        wr_valid <= 0;
        @(posedge clk);
      end
      wr_valid <= 1;
      wr_data  <= 16'($urandom);
      wr_flush <= (i == n - 1) || (flush_every > 0 && i % flush_every == flush_every - 1);
      @(posedge clk);
      while (!wr_ready) @(posedge clk);
      sent.push_back(wr_data);
    end
    wr_valid <= 0;
    wr_flush <= 0;
  endtask

  task automatic readback(int n);
    int got = 0, base = rd_gen;
    bit done_seen = 0;
    @(posedge clk);
    while (!idle) @(posedge clk);
    rd_start <= 1;
    rd_count <= 16'(n);
    @(posedge clk);
    rd_start <= 0;
    while (!done_seen) begin
      @(posedge clk);
      if (rd_valid) begin
        check($sformatf("read word %0d", got), rd_data, 16'hA000 + 16'(base + got));
        got++;
      end
      if (rd_done) done_seen = 1;
    end
    check("words read", got, n);
    check("size register", sz, n);
  endtask

  task automatic settle();
    repeat (3) @(posedge clk);
    while (!idle) @(posedge clk);
    check("no FIFO overrun", overruns, 0);
    check("words reached port", port_log.size(), sent.size());
    for (int i = 0; i < sent.size() && i < port_log.size(); i++)
      check($sformatf("port word %0d", i), port_log[i], sent[i]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // round 1: zero-wait slave, producer never stalls
    zero_wait = 1;
    send(20, 0, 0);
    settle();
    // bursts of 8 (FIFO depth) at one word per clock
    for (int i = 0; i < 16; i++)
      if (i % WFD != WFD - 1)
        check($sformatf("one word per clock %0d", i), accept_cycle[i + 1] - accept_cycle[i], 1);
    check("burst count", cr_writes, 3);
    readback(30);
    // round 2: random wait states, stalls, early flushes
    zero_wait = 0;
    sent.delete(); port_log.delete();
    send(100, 1, 5);
    settle();
    readback(17);
    send(9, 1, 0);
    settle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
