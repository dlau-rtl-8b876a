3eb38000
379a838c
2c4c8edb
205fa0be
1631b519
0e8fc830
0946d809
05cde433
0395ed10
0233f34b
0158f793
00d1fa76
007ffc62
004dfda7
002ffe7c
001cff06
