// bridge_pkg: constants and types shared by the multi-bus bridge.
//
// The example system is the two-bus SoC of twelve components C1..C12:
// C1, C2, C5, C7 and C12 sit on bus1, C3, C4, C6, C8, C9, C10 and C11 on
// bus2. Component Ck has index k-1 in every per-component vector.
//
// The priority tables below are the priority orderings of that example:
// a smaller level means a higher priority, equal levels mean equal priority,
// and LEVEL_NONE marks a requester that does not take part in an arbitration
// module. These orderings are the document's; the numeric level values, the
// address map and the bus widths' use as packed vectors are this design's.
package bridge_pkg;

  localparam int unsigned NBUS   = 2;   // bus1 and bus2
  localparam int unsigned NCOMP  = 12;  // C1..C12
  localparam int unsigned ADDR_W = 16;  // address bus width (assumed)
  localparam int unsigned LVL_W  = 4;   // width of one priority level
  localparam logic [LVL_W-1:0] LEVEL_NONE = '1;

  // Bus of each component: 0 = bus1, 1 = bus2. Slice [i] is component C(i+1).
  localparam logic [NCOMP-1:0] EX_BUS_OF = {
    1'b0,  // C12
    1'b1,  // C11
    1'b1,  // C10
    1'b1,  // C9
    1'b1,  // C8
    1'b0,  // C7
    1'b1,  // C6
    1'b0,  // C5
    1'b1,  // C4
    1'b1,  // C3
    1'b0,  // C2
    1'b0   // C1
  };

  // Internal level: priority of Ck on its own bus.
  // bus1: (h7 = h1 = h2) > h5 > h12 ;  bus2: h10 > (h3 = h6) > (h4 = h9 = h11) > h8
  localparam logic [NCOMP*LVL_W-1:0] EX_INT_LEVEL = {
    4'd2,  // C12
    4'd2,  // C11
    4'd0,  // C10
    4'd2,  // C9
    4'd3,  // C8
    4'd0,  // C7
    4'd1,  // C6
    4'd1,  // C5
    4'd2,  // C4
    4'd1,  // C3
    4'd0,  // C2
    4'd0   // C1
  };

  // External level: priority of Ck to reach the other bus through the bridge.
  // (h7 = h4 = h9 = h11) > (h1 = h2 = h5) > (h3 = h6 = h8 = h10 = h12)
  localparam logic [NCOMP*LVL_W-1:0] EX_EXT_LEVEL = {
    4'd2,  // C12
    4'd0,  // C11
    4'd2,  // C10
    4'd0,  // C9
    4'd2,  // C8
    4'd0,  // C7
    4'd2,  // C6
    4'd1,  // C5
    4'd0,  // C4
    4'd2,  // C3
    4'd1,  // C2
    4'd1   // C1
  };

  // Address map: component Ck owns the 4 KiB window starting at k * 0x1000.
  // Addresses below 0x1000 and from 0xD000 up belong to no component.
  localparam logic [ADDR_W-1:0] EX_WINDOW = 16'h1000;

  function automatic logic [NCOMP*ADDR_W-1:0] ex_base();
    logic [NCOMP*ADDR_W-1:0] v;
    for (int i = 0; i < NCOMP; i++) v[i*ADDR_W +: ADDR_W] = ADDR_W'((i + 1) * EX_WINDOW);
    return v;
  endfunction

  function automatic logic [NCOMP*ADDR_W-1:0] ex_limit();
    logic [NCOMP*ADDR_W-1:0] v;
    for (int i = 0; i < NCOMP; i++) v[i*ADDR_W +: ADDR_W] = ADDR_W'((i + 2) * EX_WINDOW - 1);
    return v;
  endfunction

  localparam logic [NCOMP*ADDR_W-1:0] EX_BASE  = ex_base();
  localparam logic [NCOMP*ADDR_W-1:0] EX_LIMIT = ex_limit();

  // Kind of an arbitration sub-module inside an arbitration level.
  typedef enum logic {
    ARB_FIXED = 1'b0,  // requesters of distinct, consecutive priorities
    ARB_RR    = 1'b1   // requesters of equal priority
  } arb_mode_e;

  // Control unit states. FREE is the idle state ("Libre").
  typedef enum logic [2:0] {
    CU_FREE     = 3'd0,
    CU_DECODE   = 3'd1,
    CU_ACTIVE   = 3'd2,  // Req high, waiting for Ack
    CU_REQ_LOW  = 3'd3,  // Req low, waiting for Ack low
    CU_RELEASE  = 3'd4,  // function de-asserted
    CU_WAIT_GNT = 3'd5,  // waiting for the grant lines to drop
    CU_ERROR    = 3'd6   // Illegal_Address
  } cu_state_e;

  // One AMBA APB request as driven by an adapter onto its target bus.
  typedef struct packed {
    logic              psel;
    logic              penable;
    logic              pwrite;
    logic [ADDR_W-1:0] paddr;
  } apb_ctrl_t;

endpackage
