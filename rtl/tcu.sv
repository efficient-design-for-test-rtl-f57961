// tcu: Test Control Unit of one router.
//
// A test interval timer starts at TIV and fires every TIT cycles. When it has
// fired and no direct or corner neighbour is under test, the router runs one
// test procedure of five phases:
//   FREE     data path test, Free-Slot phase, T_FREE cycles (TP = 01): the
//            neighbours' TPGs inject test packets in free slots only;
//   BLOCK    data path test, Block phase, T_BLOCK cycles (TP = 11): the
//            remaining test packets win over data packets;
//   EMPTY    control path test, Emptying phase (TP = 10): EmptyRequest to all
//            neighbours and the local port; ends when every one of them has
//            answered EmptyAck and the router's own buffers and output VCs
//            are drained;
//   TEST     Testing phase, T_TEST cycles: the data path runs on fixed
//            connections and the control path BIST is enabled;
//   RECOVER  Recovery phase: EmptyRequest again; ends when every port has
//            acknowledged and the fixed pipe registers are empty.
// Test results (TR) from the neighbours' TPAs and the BIST result are kept as
// per-port fault flags, cleared at the start of each procedure. A port whose
// TPG has not finished by the end of the Block phase is flagged incomplete.
// The phase durations and the TP codes follow the document; the timer
// handling of a deferred start (the timer keeps running, the test starts as
// soon as the neighbourhood is idle) is a choice of this design.
module tcu
  import esy_pkg::*;
#(
  parameter int unsigned TIT     = 20000,
  parameter int unsigned TIV     = 0,
  parameter int unsigned T_FREE  = 1000,
  parameter int unsigned T_BLOCK = 1000,
  parameter int unsigned T_TEST  = 2000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] port_exists,   // index = port; local (0) always present
  input  logic       nbr_busy,      // a direct or corner neighbour is under test
  input  logic [4:0] ea_in,
  input  logic [4:0] tr_pkt,
  input  logic [4:0] tr_err,
  input  logic [4:0] tpg_done,
  input  logic       drained,       // no flit or owned VC left in this router
  input  logic       cp_bist_fail,
  output tp_e        tp,
  output logic       er,
  output logic       fixed,
  output logic       cp_bist_en,
  output logic [2:0] phase,
  output logic [4:0] dp_fault,
  output logic [4:0] dp_incomplete,
  output logic       cp_fault,
  output logic [15:0] n_tests,
  output logic [15:0] n_tr_pkt
);
  typedef enum logic [2:0] {
    PH_NORMAL, PH_FREE, PH_BLOCK, PH_EMPTY, PH_TEST, PH_RECOVER
  } phase_e;

  phase_e      ph;
  int unsigned timer, cnt;
  logic        pending;
  logic [4:0]  mesh_ports;
  logic        all_ea;

  assign mesh_ports = port_exists & 5'b11110;
  assign all_ea     = ((ea_in | ~port_exists) == 5'b11111);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= PH_NORMAL; timer <= TIV; cnt <= 0; pending <= 1'b0;
      dp_fault <= '0; dp_incomplete <= '0; cp_fault <= 1'b0;
      n_tests <= '0; n_tr_pkt <= '0;
    end else begin
      // test interval timer
      if (timer == 0) begin
        timer   <= TIT - 1;
        pending <= 1'b1;
      end else begin
        timer <= timer - 1;
      end

      dp_fault <= dp_fault | (tr_pkt & tr_err & mesh_ports);
      n_tr_pkt <= n_tr_pkt + 16'($countones(tr_pkt & mesh_ports));

      case (ph)
        PH_NORMAL:
          if ((pending || timer == 0) && !nbr_busy) begin
            ph <= PH_FREE; cnt <= 0; pending <= 1'b0;
            dp_fault <= '0; dp_incomplete <= '0; cp_fault <= 1'b0; n_tr_pkt <= '0;
          end
        PH_FREE:
          if (cnt == T_FREE - 1) begin ph <= PH_BLOCK; cnt <= 0; end
          else cnt <= cnt + 1;
        PH_BLOCK:
          if (cnt == T_BLOCK - 1) begin
            ph <= PH_EMPTY; cnt <= 0;
            dp_incomplete <= mesh_ports & ~tpg_done;
          end else cnt <= cnt + 1;
        PH_EMPTY:
          if (all_ea && drained) begin ph <= PH_TEST; cnt <= 0; end
        PH_TEST: begin
          if (cp_bist_fail) cp_fault <= 1'b1;
          if (cnt == T_TEST - 1) begin ph <= PH_RECOVER; cnt <= 0; end
          else cnt <= cnt + 1;
        end
        PH_RECOVER:
          if (all_ea && drained) begin ph <= PH_NORMAL; n_tests <= n_tests + 1'b1; end
        default: ph <= PH_NORMAL;
      endcase
    end
  end

  always_comb begin
    case (ph)
      PH_FREE:  tp = TP_FREE;
      PH_BLOCK: tp = TP_BLOCK;
      PH_EMPTY, PH_TEST, PH_RECOVER: tp = TP_CTRL;
      default:  tp = TP_NORMAL;
    endcase
    er         = (ph == PH_EMPTY) || (ph == PH_RECOVER);
    fixed      = (ph == PH_TEST) || (ph == PH_RECOVER);
    cp_bist_en = (ph == PH_TEST);
    phase      = 3'(ph);
  end
endmodule
