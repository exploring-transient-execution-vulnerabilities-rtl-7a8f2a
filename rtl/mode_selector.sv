// mode_selector: chooses between the IP-based and the BHB-based BTB
// addressing modes for indirect branches.
//
// A four-state machine driven by executed branches: `dir` marks an executed
// direct branch (which trains the IP-based mode), `ind` an executed indirect
// branch. Three states select the BHB-based mode and one selects the
// IP-based mode; use_ip is high in that one. The transitions are those of
// the predictor-selector model recovered for the baseline processor:
//   BHB_A: dir -> BHB_B, ind -> BHB_A
//   BHB_B: dir -> IP,    ind -> BHB_B
//   BHB_C: dir -> IP,    ind -> BHB_B
//   IP:    dir -> IP,    ind -> BHB_A
// BHB_C is entered only from reset, which this design chooses as the reset
// state. dir and ind must not be raised together; the state changes at the
// clock edge and use_ip is a registered output.
module mode_selector (
  input  logic clk,
  input  logic rst_n,
  input  logic dir,
  input  logic ind,
  output logic use_ip
);

  typedef enum logic [1:0] {BHB_A, BHB_B, BHB_C, IP} sel_state_e;

  sel_state_e state, state_n;

  always_comb begin
    state_n = state;
    if (dir) begin
      unique case (state)
        BHB_A:   state_n = BHB_B;
        default: state_n = IP;
      endcase
    end else if (ind) begin
      unique case (state)
        BHB_A:   state_n = BHB_A;
        BHB_B:   state_n = BHB_B;
        BHB_C:   state_n = BHB_B;
        default: state_n = BHB_A;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= BHB_C;
    else        state <= state_n;
  end

  assign use_ip = (state == IP);

  a_one_event: assert property (@(posedge clk) !(dir && ind));

endmodule
