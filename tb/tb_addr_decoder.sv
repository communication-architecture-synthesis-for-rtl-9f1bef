// tb_addr_decoder: every 16-bit address is decoded with the example map
// (component Ck owns k*0x1000 .. k*0x1000+0xFFF) and compared with the map:
// one-hot chip select, bus of the component, Illegal_Address outside all
// ranges, and nothing at all while valid is low.
module tb_addr_decoder;
  import bridge_pkg::*;
  int checks = 0, failures = 0;

  logic        valid;
  logic [15:0] addr;
  logic [11:0] cs;
  logic        illegal_address, dest_bus;
  logic [3:0]  hit_idx;

  addr_decoder dut (.valid, .addr, .cs, .illegal_address, .dest_bus, .hit_idx);

  // bus of C1..C12, written out independently of the package
  localparam bit BUS2 [12] = '{0, 0, 1, 1, 0, 1, 0, 1, 1, 1, 1, 0};

  initial begin
    for (int a = 0; a < 65536; a++) begin
      int k;
      valid = 1'b1;
      addr  = 16'(a);
      #1;
      k = a / 4096;   // component number, 0 and 13..15 unused
      checks++;
      if (k >= 1 && k <= 12) begin
        if (cs !== 12'(1 << (k - 1)) || illegal_address || dest_bus !== BUS2[k-1] ||
            hit_idx !== 4'(k - 1)) begin
          failures++;
          $display("FAIL addr %h cs=%b ill=%b bus=%b", addr, cs, illegal_address, dest_bus);
        end
      end else begin
        if (cs !== '0 || !illegal_address) begin
          failures++;
          $display("FAIL addr %h should be illegal", addr);
        end
      end
    end
    valid = 1'b0;
    addr  = 16'h3000;
    #1;
    checks++;
    if (cs !== '0 || illegal_address) begin
      failures++;
      $display("FAIL decode while not valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
