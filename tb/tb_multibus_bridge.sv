// tb_multibus_bridge: end-to-end test of the two-bus bridge at its default
// parameters (bus1 32 bits, bus2 16 bits, FIFOs 8 x 32 bits, example
// priority tables and address map).
//
// Each bus has a model memory behind the bridge's APB port (the targets);
// the twelve components are modelled as masters by tasks. Scenarios:
//  1. internal transfers on bus1 and bus2 granted in the same clock, with
//     the chip select of each target;
//  2. bus1 -> bus2 write burst (PCI-style master, frame): each 32-bit word
//     becomes two 16-bit APB writes on bus2; FIFO O fills up because bus2
//     is slower than the master;
//  3. bus1 <- bus2 read burst: pairs of 16-bit APB reads come back as
//     32-bit words through FIFO I;
//  4. bus2 -> bus1 write burst (PI-bus-style master, master_size/items):
//     16-bit halves are packed into 32-bit APB writes, LOCK held while
//     Count is not zero;
//  5. bus2 <- bus1 read burst;
//  6. an address in no range and an address on the wrong bus: Illegal_Address;
//  7. an external request waits for a pending internal one;
//  8. Mask-Reqs holds off a bus;
//  9. cross communication: a bus1 master and a bus2 master ask for each
//     other's bus in the same clock and are served one after the other.
// Every mechanism is counted and must occur at least once.
module tb_multibus_bridge;
  import bridge_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0][11:0] req, gnt, bus_cs;
  logic [1:0]       mask_reqs, bus_illegal;
  logic [1:0][15:0] bus_addr;
  logic             pci_frame, pci_write;
  logic [1:0]       pi_master_size, pi_master_items;
  logic             pi_master_wr, pi_lock;
  logic [3:0]       pi_count;
  logic [1:0][31:0] m_wdata, m_rdata;
  logic [1:0]       m_wvalid, m_wready, m_rvalid, m_rready;
  logic [1:0]       apb_psel, apb_penable, apb_pwrite;
  logic [1:0][15:0] apb_paddr;
  logic [1:0][31:0] apb_pwdata, apb_prdata;
  logic             illegal_address;
  cu_state_e        cu_state;
  logic [1:0]       pci_state, pi_state;
  logic [11:0]      ext_gnt;
  logic [3:0]       fo_count, fi_count;

  multibus_bridge dut (
    .clk, .rst_n, .req, .mask_reqs, .gnt, .bus_addr, .bus_cs, .bus_illegal,
    .pci_frame, .pci_write, .pi_master_size, .pi_master_items, .pi_master_wr,
    .pi_lock, .pi_count, .m_wdata, .m_wvalid, .m_wready, .m_rdata, .m_rvalid, .m_rready,
    .apb_psel, .apb_penable, .apb_pwrite, .apb_paddr, .apb_pwdata, .apb_prdata,
    .illegal_address, .cu_state, .pci_state, .pi_state, .ext_gnt, .fo_count, .fi_count);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---- targets: one memory per bus behind the APB port ----------------------
  logic [31:0] mem1 [16384];   // bus1, 32-bit words, index paddr[15:2]
  logic [15:0] mem2 [32768];   // bus2, 16-bit words, index paddr[15:1]
  int apb_writes [2];
  int apb_reads  [2];

  function automatic logic [31:0] init1(int a); return 32'hB1000000 ^ 32'(a * 32'h9E37); endfunction
  function automatic logic [15:0] init2(int a); return 16'hB200 ^ 16'(a * 16'h2F1); endfunction

  always_comb begin
    apb_prdata[0] = mem1[apb_paddr[0][15:2]];
    apb_prdata[1] = {16'h0, mem2[apb_paddr[1][15:1]]};
  end

  always @(posedge clk) begin
    for (int j = 0; j < 2; j++) begin
      if (rst_n && apb_psel[j] && apb_penable[j]) begin
        int k;
        k = int'(apb_paddr[j][15:12]) - 1;
        chk(k >= 0 && k < 12 && bus_cs[j] == 12'(1 << k) && int'(EX_BUS_OF[k]) == j,
            $sformatf("chip select of the APB target on bus%0d", j + 1));
        if (apb_pwrite[j]) begin
          apb_writes[j]++;
          if (j == 0) mem1[apb_paddr[0][15:2]] <= apb_pwdata[0];
          else        mem2[apb_paddr[1][15:1]] <= apb_pwdata[1][15:0];
        end else apb_reads[j]++;
      end
    end
  end

  // ---- mechanism counters -----------------------------------------------------
  int n_concurrent = 0, n_fifo_o_full = 0, n_fifo_i_used = 0, n_width_split = 0;
  int n_width_pack = 0, n_lock = 0, n_illegal = 0, n_int_before_ext = 0, n_mask = 0;
  int n_ext_write = 0, n_ext_read = 0, n_cross = 0;
  int cyc = 0;
  int t_g7 = 0, t_g11 = 0, t_end7 = 0;
  logic g7_d = 0, g11_d = 0;

  // first clock of the external grants of C7 (bus2) and C11 (bus1)
  always @(posedge clk) begin
    if (gnt[1][6] && !g7_d && t_g7 == 0)   t_g7  = cyc;
    if (gnt[0][10] && !g11_d && t_g11 == 0) t_g11 = cyc;
    g7_d  <= gnt[1][6];
    g11_d <= gnt[0][10];
  end

  always @(posedge clk) begin
    cyc++;
    if (fo_count == 4'd8) n_fifo_o_full++;
    if (fi_count != 0) n_fifo_i_used++;
    if (pi_lock) n_lock++;
    if (rst_n && !($onehot0(gnt[0]) || ext_gnt != '0) && !($onehot0(gnt[1]) || ext_gnt != '0))
      chk(0, "one owner per bus");
  end

  // ---- masters ------------------------------------------------------------------
  function automatic int bus_of(int k); return int'(EX_BUS_OF[k-1]); endfunction

  task automatic get_bus(int k, int b, logic [15:0] addr);
    int t0 = cyc;
    @(negedge clk);
    req[b][k-1] = 1'b1;
    while (!gnt[b][k-1] && cyc - t0 < 2000) @(negedge clk);
    chk(gnt[b][k-1], $sformatf("C%0d granted bus%0d", k, b + 1));
    bus_addr[bus_of(k)] = addr;
  endtask

  task automatic drop_bus(int k, int b);
    req[b][k-1] = 1'b0;
    @(negedge clk);
  endtask

  task automatic wait_done();
    int t0 = cyc;
    while (cu_state != CU_WAIT_GNT && cyc - t0 < 3000) @(negedge clk);
    chk(cu_state == CU_WAIT_GNT, "bridge finished the external transfer");
  endtask

  // bus1 master (PCI-style) writes n 32-bit words to a bus2 target
  task automatic pci_write_burst(int k, logic [15:0] addr, int n);
    logic [31:0] words[$];
    int pushed = 0, w0 = apb_writes[1];
    for (int i = 0; i < n; i++) words.push_back($urandom);
    get_bus(k, 1, addr);
    pci_write = 1; pci_frame = 1;
    while (pushed < n) begin
      m_wvalid[0] = 1; m_wdata[0] = words[pushed];
      #1;
      if (m_wready[0]) pushed++;
      @(negedge clk);
    end
    m_wvalid[0] = 0;
    pci_frame = 0;
    wait_done();
    drop_bus(k, 1);
    repeat (2) @(negedge clk);
    chk(apb_writes[1] - w0 == 2 * n, $sformatf("%0d words as %0d bus2 writes", n, apb_writes[1] - w0));
    for (int i = 0; i < n; i++) begin
      chk({mem2[(addr >> 1) + 2 * i + 1], mem2[(addr >> 1) + 2 * i]} == words[i],
          $sformatf("bus1->bus2 word %0d", i));
    end
    if (apb_writes[1] - w0 == 2 * n) n_width_split++;
    n_ext_write++;
  endtask

  // bus1 master reads n 32-bit words from a bus2 target
  task automatic pci_read_burst(int k, logic [15:0] addr, int n);
    logic [31:0] got[$];
    int guard = 0;
    get_bus(k, 1, addr);
    pci_write = 0; pci_frame = 1; m_rready[0] = 1;
    while (got.size() < n && guard < 2000) begin
      #1;
      if (m_rvalid[0]) got.push_back(m_rdata[0]);
      @(negedge clk);
      guard++;
    end
    pci_frame = 0;
    m_rready[0] = 0;
    wait_done();
    drop_bus(k, 1);
    for (int i = 0; i < n; i++)
      chk(got[i] == {mem2[(addr >> 1) + 2 * i + 1], mem2[(addr >> 1) + 2 * i]},
          $sformatf("bus2->bus1 read word %0d", i));
    n_ext_read++;
  endtask

  // bus2 master (PI-bus-style) writes {items,size}+1 32-bit words to bus1
  task automatic pi_write_burst(int k, logic [15:0] addr, logic [1:0] items, logic [1:0] size);
    int n = int'({items, size}) + 1;
    logic [15:0] halves[$];
    int pushed = 0, w0 = apb_writes[0];
    for (int i = 0; i < 2 * n; i++) halves.push_back(16'($urandom));
    get_bus(k, 0, addr);
    pi_master_wr = 1; pi_master_items = items; pi_master_size = size;
    while (pushed < 2 * n) begin
      m_wvalid[1] = 1; m_wdata[1] = {16'h0, halves[pushed]};
      #1;
      if (m_wready[1]) pushed++;
      @(negedge clk);
    end
    m_wvalid[1] = 0;
    wait_done();
    drop_bus(k, 0);
    repeat (2) @(negedge clk);
    chk(apb_writes[0] - w0 == n, $sformatf("%0d bus1 writes, expected %0d", apb_writes[0] - w0, n));
    for (int i = 0; i < n; i++)
      chk(mem1[(addr >> 2) + i] == {halves[2 * i + 1], halves[2 * i]},
          $sformatf("bus2->bus1 word %0d", i));
    n_width_pack++;
    n_ext_write++;
  endtask

  // bus2 master reads {items,size}+1 32-bit words from bus1, as 16-bit halves
  task automatic pi_read_burst(int k, logic [15:0] addr, logic [1:0] items, logic [1:0] size);
    int n = int'({items, size}) + 1;
    logic [15:0] got[$];
    int guard = 0;
    get_bus(k, 0, addr);
    pi_master_wr = 0; pi_master_items = items; pi_master_size = size;
    m_rready[1] = 1;
    while (got.size() < 2 * n && guard < 2000) begin
      #1;
      if (m_rvalid[1]) got.push_back(m_rdata[1][15:0]);
      @(negedge clk);
      guard++;
    end
    m_rready[1] = 0;
    wait_done();
    drop_bus(k, 0);
    for (int i = 0; i < n; i++)
      chk({got[2 * i + 1], got[2 * i]} == mem1[(addr >> 2) + i], $sformatf("bus1->bus2 read word %0d", i));
    n_ext_read++;
  endtask

  task automatic illegal_burst(int k, int b, logic [15:0] addr);
    int t0;
    int w0 = apb_writes[0] + apb_writes[1] + apb_reads[0] + apb_reads[1];
    get_bus(k, b, addr);
    t0 = cyc;
    while (!illegal_address && cyc - t0 < 20) @(negedge clk);
    chk(illegal_address, $sformatf("Illegal_Address for %h", addr));
    if (illegal_address) n_illegal++;
    drop_bus(k, b);
    repeat (2) @(negedge clk);
    chk(cu_state == CU_FREE, "control unit free after the error");
    chk(apb_writes[0] + apb_writes[1] + apb_reads[0] + apb_reads[1] == w0, "no APB cycle on an illegal address");
  endtask

  initial begin
    for (int a = 0; a < 16384; a++) mem1[a] = init1(a);
    for (int a = 0; a < 32768; a++) mem2[a] = init2(a);
    req = '0; mask_reqs = '0; bus_addr = '0; pci_frame = 0; pci_write = 0;
    pi_master_size = '0; pi_master_items = '0; pi_master_wr = 0;
    m_wdata = '0; m_wvalid = '0; m_rready = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. concurrent internal transfers: C1 -> C2 on bus1, C10 -> C3 on bus2
    fork
      get_bus(1, 0, 16'h2040);
      get_bus(10, 1, 16'h3040);
    join
    #1;
    chk(gnt[0][0] && gnt[1][9], "both internal grants at once");
    chk(bus_cs[0] == 12'(1 << 1) && bus_cs[1] == 12'(1 << 2), "chip selects C2 and C3");
    if (gnt[0][0] && gnt[1][9]) n_concurrent++;
    fork drop_bus(1, 0); drop_bus(10, 1); join

    // 2./3. bus1 <-> bus2 through the PCI/APB adapter
    pci_write_burst(1, 16'h3010, 12);
    pci_read_burst(2, 16'h4020, 5);
    pci_read_burst(7, 16'h3010, 3);   // reads back what was written

    // 4./5. bus2 <-> bus1 through the PI-bus/APB adapter
    pi_write_burst(4, 16'h5000, 2'b01, 2'b01);
    pi_read_burst(9, 16'h7100, 2'b00, 2'b11);
    pi_read_burst(3, 16'h5000, 2'b00, 2'b10);   // reads back what was written
    pi_write_burst(11, 16'hC000, 2'b00, 2'b00);

    // 6. illegal addresses: outside every range, and on the wrong bus
    illegal_burst(3, 0, 16'hE000);
    illegal_burst(1, 1, 16'h2000);

    // 7. internal before external: C5 holds bus1, C6 wants bus1 from bus2
    fork
      begin get_bus(5, 0, 16'h1000); repeat (10) @(negedge clk); drop_bus(5, 0); end
      begin
        repeat (3) @(negedge clk);
        begin
          int t0 = cyc;
          pi_write_burst(6, 16'h7000, 2'b00, 2'b00);
          if (cyc - t0 > 7) n_int_before_ext++;
        end
      end
    join

    // 8. Mask-Reqs on bus2
    @(negedge clk);
    mask_reqs = 2'b10;
    req[1][7] = 1'b1;   // C8 asks for bus2
    repeat (5) begin
      @(negedge clk);
      chk(!gnt[1][7], "no bus2 grant while Mask-Reqs is high");
    end
    if (!gnt[1][7]) n_mask++;
    mask_reqs = 2'b00;
    repeat (2) @(negedge clk);
    chk(gnt[1][7], "bus2 granted after Mask-Reqs falls");
    req[1][7] = 1'b0;
    repeat (2) @(negedge clk);

    // 9. cross communication: C7 (bus1) writes to bus2 while C11 (bus2)
    //    writes to bus1, both asking in the same clock. They share the top
    //    external level (round-robin); C11 was the last of that group served,
    //    so C7 goes first and C11 only after C7 has released both buses.
    t_g7 = 0; t_g11 = 0; t_end7 = 0;
    fork
      begin pci_write_burst(7, 16'h4200, 4); t_end7 = cyc; end
      pi_write_burst(11, 16'hC100, 2'b00, 2'b11);
    join
    chk(t_g7 != 0 && t_g11 != 0, "both cross transfers granted");
    chk(t_g7 < t_g11, "cross communication: C7 served before C11");
    chk(t_g11 > t_end7 - 2, "cross communication: C11 granted only after C7 released the buses");
    if (t_g7 != 0 && t_g11 > t_g7) n_cross++;

    // every mechanism must have happened
    chk(n_concurrent > 0,     "concurrent internal grants never happened");
    chk(n_fifo_o_full > 0,    "FIFO O never full");
    chk(n_fifo_i_used > 0,    "FIFO I never used");
    chk(n_width_split > 0,    "no 32 -> 16 width split");
    chk(n_width_pack > 0,     "no 16 -> 32 width packing");
    chk(n_lock > 0,           "LOCK never held");
    chk(n_illegal == 2,       "Illegal_Address not raised twice");
    chk(n_int_before_ext > 0, "external request never waited for an internal one");
    chk(n_mask > 0,           "Mask-Reqs never held a bus");
    chk(n_ext_write > 0 && n_ext_read > 0, "external reads and writes");
    chk(n_cross > 0,          "cross communication never happened");
    $display("mechanisms: concurrent=%0d fifo_o_full=%0d fifo_i_used=%0d split=%0d pack=%0d lock=%0d illegal=%0d int_before_ext=%0d mask=%0d ext_wr=%0d ext_rd=%0d cross=%0d",
             n_concurrent, n_fifo_o_full, n_fifo_i_used, n_width_split, n_width_pack, n_lock,
             n_illegal, n_int_before_ext, n_mask, n_ext_write, n_ext_read, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
