// ic_ec_serdes: carries bytes over one 2-bit slow-control lane of an LpGBT
// link (the IC lane to the LpGBT chip or the EC lane to the SCA chip).
// Each LpGBT frame, one per bunch crossing, holds one 2-bit pair per lane.
//
// The line code is this design's own: the idle lane sends 2'b11; a byte is
// sent as a start pair 2'b00 followed by its four pairs, least significant
// first, so a byte takes five frames and bytes may follow back to back.
// The receiver waits for a start pair while idle, then collects four pairs.
// (The real IC and EC channels carry HDLC frames; that framing would sit in
// the host or in a layer above this one.)
//
// Transmit: a byte is taken (tx_valid && tx_ready) only on a tx_strobe
// while the serialiser is idle; tx_pair is registered and changes only in
// the clock after a tx_strobe. Receive: rx_pair is sampled on rx_strobe;
// rx_valid pulses for one clock with the byte in rx_data.
module ic_ec_serdes (
  input  logic       clk,
  input  logic       rst,
  // downlink side
  input  logic       tx_strobe,  // downlink frame boundary
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  output logic [1:0] tx_pair,
  // uplink side
  input  logic       rx_strobe,  // uplink frame received
  input  logic [1:0] rx_pair,
  output logic [7:0] rx_data,
  output logic       rx_valid
);

  localparam logic [1:0] IDLE_PAIR  = 2'b11;
  localparam logic [1:0] START_PAIR = 2'b00;

  logic [7:0] tx_sh;
  logic [2:0] tx_left;   // data pairs still to send
  logic [5:0] rx_sh;     // pairs received so far
  logic [2:0] rx_left;   // data pairs still to receive

  assign tx_ready = tx_strobe && (tx_left == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_pair <= IDLE_PAIR;
      tx_sh   <= '0;
      tx_left <= '0;
    end else if (tx_strobe) begin
      if (tx_left != '0) begin
        tx_pair <= tx_sh[1:0];
        tx_sh   <= tx_sh >> 2;
        tx_left <= tx_left - 1'b1;
      end else if (tx_valid) begin
        tx_pair <= START_PAIR;
        tx_sh   <= tx_data;
        tx_left <= 3'd4;
      end else begin
        tx_pair <= IDLE_PAIR;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_sh    <= '0;
      rx_left  <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (rx_strobe) begin
        if (rx_left == '0) begin
          if (rx_pair == START_PAIR) rx_left <= 3'd4;
        end else begin
          rx_sh   <= {rx_pair, rx_sh[5:2]};
          rx_left <= rx_left - 1'b1;
          if (rx_left == 3'd1) begin
            rx_data  <= {rx_pair, rx_sh};
            rx_valid <= 1'b1;
          end
        end
      end
    end
  end

endmodule
