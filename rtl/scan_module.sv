// scan_module: one replica of the TMR triple, a small sequential circuit whose
// flip-flops double as a scan chain.
//
// The circuit under protection is any synchronous design with a full scan
// chain; the technique is demonstrated on a circuit of three flip-flops and two
// inputs (a and b). Its next-state function is not specified, so this design
// uses a rotating register that folds the parity of its inputs into the bit
// it rotates in:
//     normal  (sce=0, en=1): state <= {state[L_SC-2:0], state[L_SC-1] ^ ^din}
//     hold    (sce=0, en=0): state <= state
//     scan    (sce=1)      : state <= {state[L_SC-2:0], sci}
// A flipped bit therefore stays a single flipped bit and moves around the
// register, so an upset is latent until it reaches the output bit. The
// output and the scan-out (SCO) are both state[L_SC-1]; L_SC scan shifts with
// SCI tied to SCO give the original state back.
//
// Interface: the `upset` mask models single event upsets for verification:
// every set bit flips the matching flip-flop at the next rising clock edge,
// on top of whatever the flip-flop would load. Tie it to zero in use.
// Reset is asynchronous, active low, to the all-zero state (an assumption).
module scan_module #(
  parameter int unsigned L_SC = 3,  // scan chain length = number of flip-flops
  parameter int unsigned IN_W = 2   // functional inputs (a, b)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,      // functional clock enable
  input  logic            sce,     // scan chain enable
  input  logic            sci,     // scan chain input
  input  logic [IN_W-1:0] din,     // functional inputs
  input  logic [L_SC-1:0] upset,   // fault injection mask
  output logic            sco,     // scan chain output
  output logic            dout,    // functional output
  output logic [L_SC-1:0] state    // flip-flop contents, for observation
);

  logic [L_SC-1:0] nxt;

  always_comb begin
    if (sce)
      nxt = {state[L_SC-2:0], sci};
    else if (en)
      nxt = {state[L_SC-2:0], state[L_SC-1] ^ (^din)};
    else
      nxt = state;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= '0;
    else        state <= nxt ^ upset;
  end

  assign sco  = state[L_SC-1];
  assign dout = state[L_SC-1];

  initial assert (L_SC >= 2) else $error("scan_module: L_SC must be at least 2");

endmodule
