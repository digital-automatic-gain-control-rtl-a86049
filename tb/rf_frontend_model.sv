// rf_frontend_model: behavioural model of the receive path of a MAX2829-class
// radio front end, for testbenches only (not synthesizable logic).
//
// Models what the AGC sees: an LNA with three gain levels (0, -16 and -32 dB
// relative to high, selected by the B7:B6 code 11/10/00), an RSSI detector
// behind the LNA whose output voltage is linear in the power at its input,
// and a VGA with 2 dB steps behind the detector (so VGA changes do not reach
// the RSSI). After an LNA change the RSSI output keeps its old value for
// RSSI_DELAY clocks before it moves, standing in for the detector's settling.
// The RSSI line is set at run time, so that bands and channels with
// different detector characteristics can be modelled:
//   V = slope_v_per_db * (P + 100 dBm) + offset_v
// where P is the power after the LNA. out_dbm is the power after the VGA,
// referred so that the ideal AGC setting gives -40 dBm.
module rf_frontend_model #(
  parameter int RSSI_DELAY = 16
) (
  input  logic       clk,
  input  real        p_in_dbm,
  input  real        slope_v_per_db,
  input  real        offset_v,
  input  logic [1:0] lna_gain,
  input  logic [4:0] vga_gain,
  output real        rssi_v,
  output real        out_dbm
);

  real p_lna;
  int  delay_cnt = 0;
  logic [1:0] lna_seen = 2'b11;
  real rssi_target;

  function automatic real lna_db(logic [1:0] code);
    case (code)
      2'b11:   return 0.0;
      2'b10:   return -16.0;
      default: return -32.0;
    endcase
  endfunction

  always_comb begin
    p_lna       = p_in_dbm + lna_db(lna_gain);
    rssi_target = slope_v_per_db * (p_lna + 100.0) + offset_v;
    out_dbm     = p_lna + 2.0 * real'(vga_gain);
  end

  initial rssi_v = 0.0;

  always_ff @(posedge clk) begin
    if (lna_gain != lna_seen) begin
      lna_seen  <= lna_gain;
      delay_cnt <= RSSI_DELAY;
    end else if (delay_cnt > 0) begin
      delay_cnt <= delay_cnt - 1;
    end else begin
      rssi_v <= rssi_target;
    end
  end

endmodule
