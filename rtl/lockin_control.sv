// lockin_control: the logic that manages the lock-ins.
//
// It turns the Frequencies OK pulse from the Frequency Loader into the Write
// Enable pulse one clock later; Write Enable restarts the sinusoid generators
// with the new frequency set and begins the acquisition. From then on the
// control cuts the read-out stream into back-to-back windows of 2**AVG_LOG2
// samples (in_valid/in_last of every lock-in) and raises data_available when
// the means of a window are ready. data_available stays high until the
// processor acknowledges it with data_ack; a window that completes while it is
// still high sets the sticky overrun flag (cleared by the next Write Enable),
// so that an error can be reported.
//
// Timing: Write Enable follows Frequencies OK by one clock. The generators
// load on the edge that samples Write Enable and deliver their first sample in
// the second clock after Write Enable; that sample is the
// first sample of the first window (sample_valid rises with it). The means of
// a window appear LOCKIN_LAT clocks after its last sample; data_available
// rises with them (window_done pulses for one clock at the same time).
//
// The one-clock delay between Frequencies OK and Write Enable follows the
// description; the windowing, the data-available handshake and the overrun
// flag are this design's choices.
module lockin_control #(
  parameter int AVG_LOG2   = 10,
  parameter int LOCKIN_LAT = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic freq_ok,
  input  logic data_ack,
  output logic write_enable,
  output logic acquiring,
  output logic sample_valid,
  output logic sample_last,
  output logic window_done,
  output logic data_available,
  output logic overrun,
  output logic [31:0] window_count
);

  logic                we_d;       // generators load the new set
  logic                start_d;    // generators produce their first sample
  logic [AVG_LOG2-1:0] sample_cnt;
  logic [LOCKIN_LAT-1:0] last_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      write_enable <= 1'b0;
      we_d         <= 1'b0;
      start_d      <= 1'b0;
      acquiring    <= 1'b0;
      sample_cnt   <= '0;
    end else begin
      write_enable <= freq_ok;
      we_d         <= write_enable;
      start_d      <= we_d;
      if (write_enable) begin
        acquiring  <= 1'b0;
        sample_cnt <= '0;
      end else if (start_d) begin
        acquiring  <= 1'b1;
      end
      if (sample_valid) sample_cnt <= sample_cnt + 1'b1;
    end
  end

  assign sample_valid = (acquiring || start_d) && !write_enable && !we_d;
  assign sample_last  = sample_valid && (sample_cnt == '1);

  // Track each window's last sample through the lock-in pipeline.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_pipe <= '0;
    else if (write_enable) last_pipe <= '0;
    else last_pipe <= {last_pipe[LOCKIN_LAT-2:0], sample_last};
  end

  assign window_done = last_pipe[LOCKIN_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_available <= 1'b0;
      overrun        <= 1'b0;
      window_count   <= '0;
    end else begin
      if (write_enable) begin
        overrun      <= 1'b0;
        window_count <= '0;
      end
      if (window_done) begin
        data_available <= 1'b1;
        window_count   <= window_count + 1;
        if (data_available && !data_ack) overrun <= 1'b1;
      end else if (data_ack) begin
        data_available <= 1'b0;
      end
    end
  end

  initial assert (LOCKIN_LAT >= 2) else $error("lockin_control: LOCKIN_LAT must be at least 2");

endmodule
