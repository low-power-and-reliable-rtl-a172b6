`timescale 1ps/1ps
// scgc_link_top: one self-calibrated, green coded link between two
// adjacent NoC switches.
//
// Transmit side: a 32-bit packet word is serialized 4:1 into 8-bit phits,
// each phit is green coded into 10 bits (two 4-to-5 groups) and every coded
// bit is triplicated onto three adjacent wires; the 30 wire bits leave
// through the launch register (DFF1) towards the low-swing drivers. During
// calibration a multiplexer replaces the coded phit by the MAF test vector.
//
// Receive side: the 30 level-converted wires enter the run-time error
// detector (double sampling on the clock and on the clock delayed by delta
// t, with in-place correction), the majority gates remove single wire
// errors and the decode register (DFF4) holds the 10-bit phit that a switch
// would route. The green decoder and the 1:4 deserializer restore the
// packet word.
//
// Calibration: the voltage scaling control unit runs the MAF test from the
// lowest swing upward until the test error detector sees a clean pass, then
// adjusts the swing every WINDOW cycles from the run-time error flags. Its
// S0..S2 outputs go to the low-swing supply and its level to the adaptive
// delay line, which also sets delta t.
//
// Ports: the link is cut at the analog parts. wire_tx/wire_tx_valid go to
// the drivers, wire_rx/wire_rx_valid come from the level converters; the
// valid sideband marks data phits and is this design's framing choice. The
// transmitter and the receiver share clk (single-clock link).
//
// Latency: a phit leaves the serializer in cycle t, is on wire_tx in t+1,
// in DFF2 in t+2 and in router_phit in t+3; the deserialized word appears
// one cycle after its fourth phit reaches router_phit.
module scgc_link_top
  import scgc_pkg::*;
#(
  parameter int unsigned WINDOW = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cal_start,
  // packet words from the sending switch / network interface
  input  logic              pkt_in_valid,
  input  logic [PKT_W-1:0]  pkt_in_data,
  output logic              pkt_in_ready,
  // to the low-swing drivers
  output logic [WIRE_W-1:0] wire_tx,
  output logic              wire_tx_valid,
  // from the level converters
  input  logic [WIRE_W-1:0] wire_rx,
  input  logic              wire_rx_valid,
  // received coded phit, as carried inside the next switch
  output logic [CODE_W-1:0] router_phit,
  output logic              router_phit_valid,
  // packet words at the receiver
  output logic              pkt_out_valid,
  output logic [PKT_W-1:0]  pkt_out_data,
  // swing control and status
  output logic [2:0]        swing_s,
  output level_e            swing_level,
  output logic              test_mode,
  output logic              t_finish,
  output logic              v_scale,
  output logic [7:0]        test_err_count,   // errors of the last test pass
  output logic [CODE_W-1:0] maj_corrected     // wire errors outvoted this cycle
);

  // ---------------- transmit side ----------------
  logic              ser_valid;
  logic [PHIT_W-1:0] ser_phit;
  logic [CODE_W-1:0] green_code, tx_code;
  logic [WIRE_W-1:0] tx_wires;

  logic              tpg_start, tpg_active, tpg_done;
  logic [CODE_W-1:0] tpg_d;

  serializer u_ser (
    .clk, .rst_n,
    .stall      (test_mode),
    .pkt_valid  (pkt_in_valid),
    .pkt_data   (pkt_in_data),
    .pkt_ready  (pkt_in_ready),
    .phit_valid (ser_valid),
    .phit       (ser_phit)
  );

  green_encoder u_genc (
    .data      (ser_phit),
    .code      (green_code),
    .converted ()
  );

  maf_tpg u_tpg (
    .clk, .rst_n,
    .t_start (tpg_start),
    .d       (tpg_d),
    .active  (tpg_active),
    .done    (tpg_done),
    .victim  ()
  );

  assign tx_code = tpg_active ? tpg_d : green_code;

  triplication_encoder u_trip (
    .x (tx_code),
    .y (tx_wires)
  );

  // DFF1: launch register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wire_tx       <= '0;
      wire_tx_valid <= 1'b0;
    end else begin
      wire_tx       <= tx_wires;
      wire_tx_valid <= ser_valid && !tpg_active;
    end
  end

  // ---------------- receive side ----------------
  logic              clk_dly;
  logic [WIRE_W-1:0] rx_corr, rx_err;
  logic              rx_valid_q;
  logic [CODE_W-1:0] maj_x;
  logic [WIRE_W-1:0] rt_err_q;
  logic [PHIT_W-1:0] rx_phit;

  adaptive_delay_line u_dly (
    .clk_in  (clk),
    .level   (swing_level),
    .clk_out (clk_dly)
  );

  runtime_error_detector u_rted (
    .clk, .clk_dly, .rst_n,
    .din  (wire_rx),
    .dout (rx_corr),
    .err  (rx_err)
  );

  // sideband valid, aligned with DFF2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_valid_q <= 1'b0;
    else        rx_valid_q <= wire_rx_valid;
  end

  majority_decoder u_maj (
    .y         (rx_corr),
    .x         (maj_x),
    .corrected (maj_corrected)
  );

  // DFF4: decode register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      router_phit       <= '0;
      router_phit_valid <= 1'b0;
      rt_err_q          <= '0;
    end else begin
      router_phit       <= maj_x;
      router_phit_valid <= rx_valid_q;
      rt_err_q          <= rx_err;
    end
  end

  green_decoder u_gdec (
    .code (router_phit),
    .data (rx_phit)
  );

  deserializer u_deser (
    .clk, .rst_n,
    .phit_valid (router_phit_valid),
    .phit       (rx_phit),
    .pkt_valid  (pkt_out_valid),
    .pkt_data   (pkt_out_data)
  );

  // ---------------- self-calibration ----------------
  logic       ted_error, ted_busy, ted_clear;

  test_error_detector #(.W(CODE_W), .LATENCY(3)) u_ted (
    .clk, .rst_n,
    .clear      (ted_clear),
    .sent_valid (tpg_active),
    .sent       (tpg_d),
    .rcvd       (router_phit),
    .err_count  (test_err_count),
    .error      (ted_error),
    .busy       (ted_busy)
  );

  voltage_scaling_ctrl #(.W(WIRE_W), .WINDOW(WINDOW)) u_vsc (
    .clk, .rst_n,
    .cal_start,
    .tpg_start,
    .tpg_done,
    .ted_busy,
    .ted_error,
    .ted_clear,
    .test_mode,
    .t_finish,
    .rt_valid (router_phit_valid),
    .rt_err   (rt_err_q),
    .v_scale,
    .level    (swing_level),
    .s        (swing_s)
  );

endmodule
