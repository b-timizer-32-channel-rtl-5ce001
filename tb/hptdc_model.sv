// hptdc_model -- behavioural model of the readout side of the 32-channel TDC.
// Not part of the design: the TDC is an external ASIC.
// Each L0 trigger (sampled on ce40) queues one event: a TDC header (0010,
// TDC ID, event ID, bunch ID), nhits hit words (0100, TDC ID[2:0], channel,
// coarse, fine) and a TDC trailer (0011, TDC ID, event ID, word count =
// nhits + 2), with nhits = (5*n + 3) mod HIT_MOD.  The hit count and the hit fields of event n come from the
// functions below so a checker can rebuild them.  Words are offered with
// valid and consumed on a clock with get && valid.
module hptdc_model #(
  parameter logic [3:0] TDC_ID  = 4'h5,
  parameter int         HIT_MOD = 12     // events carry 0 .. HIT_MOD-1 hits
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce40,
  input  logic        l0_trigger,
  input  logic        get,
  output logic        valid,
  output logic [31:0] data
);
  int q_ev [$];          // queued event numbers
  int ev_count = 0;
  int cur_ev   = -1;
  int idx      = 0;      // word index inside the current event

  function automatic int nhits(int ev);
    return (5 * ev + 3) % HIT_MOD;
  endfunction

  function automatic logic [31:0] hit_word(int ev, int k);
    logic [4:0]  ch     = 5'((ev * 7 + k * 3) % 32);
    logic [10:0] coarse = 11'(ev * 16 + (k % 4));
    logic [7:0]  fine   = 8'(ev * 13 + k * 29);
    return {4'b0100, 1'b0, TDC_ID[2:0], ch, coarse, fine};
  endfunction

  function automatic logic [31:0] word_of(int ev, int i);
    int n = nhits(ev);
    if (i == 0)      return {4'b0010, TDC_ID, 12'(ev), 12'(ev * 3)};
    else if (i <= n) return hit_word(ev, i - 1);
    else             return {4'b0011, TDC_ID, 12'(ev), 12'(n + 2)};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_ev.delete(); ev_count <= 0; cur_ev <= -1; idx <= 0;
    end else begin
      if (l0_trigger && ce40) begin
        q_ev.push_back(ev_count);
        ev_count <= ev_count + 1;
      end
      if (cur_ev < 0 && q_ev.size() > 0) begin
        cur_ev <= q_ev.pop_front();
        idx    <= 0;
      end else if (cur_ev >= 0 && get) begin
        if (idx == nhits(cur_ev) + 1) cur_ev <= -1;
        else idx <= idx + 1;
      end
    end
  end

  assign valid = (cur_ev >= 0);
  assign data  = (cur_ev >= 0) ? word_of(cur_ev, idx) : 32'd0;
endmodule
