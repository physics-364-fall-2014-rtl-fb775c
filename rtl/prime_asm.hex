006e
015f
005f
055e
015f
006d
065f
045c
005e
0160
0060
055e
0160
005f
0660
031f
0060
065e
0161
0061
055e
0161
065f
030a
0060
0761
0162
065f
0302
0413
020a
005d
0163
005f
0164
0064
066a
042b
0164
0063
0566
0163
0223
0064
066b
0433
0164
0063
0567
0163
022b
0064
066c
043b
0164
0063
0568
0163
0233
0063
0564
0163
006f
0160
0070
0161
0061
065e
0161
0942
0060
065e
0160
0940
0063
0800
0202
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0200
0000
0001
0000
0000
0000
0000
0000
0000
0000
1000
0100
0010
2710
03e8
0064
000a
270f
0001
1000
0300
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
