// tb_control_unit: drives the control unit through its sequences with a
// model adapter that answers the 4-phase handshake after a random delay:
//  * a legal external transfer: FREE -> DECODE -> ACTIVE (Req high until
//    Ack) -> REQ_LOW (Req low until Ack low) -> RELEASE -> WAIT_GNT ->
//    FREE with a flush pulse, checking cu = {init, tgt, write}, the adapter
//    select and route_en in every state;
//  * an address in no range and an address on the wrong bus: ERROR with
//    Illegal_Address, no Req, no adapter selected.
module tb_control_unit;
  import bridge_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ext_valid, ext_init_bus, ext_tgt_bus, dec_illegal, dec_bus, init_write, ack;
  logic       req, route_en, flush, illegal_address;
  logic [1:0] adapter_sel;
  logic [2:0] cu;
  cu_state_e  state;

  control_unit dut (.clk, .rst_n, .ext_valid, .ext_init_bus, .ext_tgt_bus, .dec_illegal,
                    .dec_bus, .init_write, .ack, .req, .adapter_sel, .cu, .route_en, .flush,
                    .illegal_address, .state);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s (state %0d)", $time, what, state);
    end
  endtask

  // model adapter: raises Ack some clocks after Req, drops it after Req falls
  int ack_delay;
  always @(posedge clk) begin
    if (!rst_n) ack <= 1'b0;
    else if (req && !ack) begin
      if (ack_delay == 0) ack <= 1'b1;
      else ack_delay <= ack_delay - 1;
    end else if (!req && ack) ack <= 1'b0;
  end

  task automatic legal_transfer(logic ib, logic wr, int delay);
    int guard;
    int flushes;
    @(negedge clk);
    ext_valid = 1; ext_init_bus = ib; ext_tgt_bus = !ib; dec_illegal = 0; dec_bus = !ib;
    init_write = wr; ack_delay = delay;
    @(negedge clk);
    chk(state == CU_DECODE, "DECODE after the grant event");
    chk(!req && !route_en, "nothing active in DECODE");
    @(negedge clk);
    chk(state == CU_ACTIVE, "ACTIVE after DECODE");
    chk(cu == {ib, !ib, wr}, $sformatf("cu word %b", cu));
    guard = 0;
    while (!ack && guard < 50) begin
      chk(req && route_en && adapter_sel == 2'(1 << int'(!ib)), "Req, route and select while waiting for Ack");
      @(negedge clk);
      guard++;
    end
    chk(guard == delay + 1, $sformatf("Req held %0d clocks, adapter delay %0d", guard, delay));
    @(negedge clk);
    chk(state == CU_REQ_LOW && !req, "Req low after Ack");
    chk(adapter_sel != '0, "adapter still selected while Ack is high");
    while (ack) @(negedge clk);
    chk(state == CU_REQ_LOW, "REQ_LOW until the adapter's Ack low is seen");
    @(negedge clk);
    chk(state == CU_RELEASE && adapter_sel == '0, "function de-asserted after Ack low");
    chk(route_en, "data path still open in RELEASE");
    @(negedge clk);
    chk(state == CU_WAIT_GNT, "waiting for the grant to drop");
    repeat (3) begin
      @(negedge clk);
      chk(state == CU_WAIT_GNT && route_en && !flush, "still waiting while granted");
    end
    ext_valid = 0;
    #1 chk(flush, "flush when the grant drops");
    @(negedge clk);
    chk(state == CU_FREE && !route_en && !flush, "back to FREE");
  endtask

  task automatic illegal_transfer(logic bad_range);
    @(negedge clk);
    ext_valid = 1; ext_init_bus = 0; ext_tgt_bus = 1;
    dec_illegal = bad_range; dec_bus = bad_range ? 1'b1 : 1'b0;   // wrong bus when not bad_range
    @(negedge clk);
    @(negedge clk);
    chk(state == CU_ERROR && illegal_address, "Illegal_Address raised");
    repeat (3) begin
      @(negedge clk);
      chk(!req && adapter_sel == '0 && !route_en, "no adapter activity on an illegal address");
    end
    ext_valid = 0;
    @(negedge clk);
    chk(state == CU_FREE && !illegal_address, "back to FREE after the error");
  endtask

  initial begin
    ext_valid = 0; ext_init_bus = 0; ext_tgt_bus = 0; dec_illegal = 0; dec_bus = 0;
    init_write = 0; ack_delay = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) begin
      @(negedge clk);
      chk(state == CU_FREE && !req && !route_en, "idle in FREE");
    end
    legal_transfer(0, 1, 3);
    legal_transfer(1, 0, 0);
    legal_transfer(1, 1, 7);
    illegal_transfer(1);
    illegal_transfer(0);
    legal_transfer(0, 0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
